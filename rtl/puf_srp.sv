// puf_srp -- Srp, the special-purpose register that holds the final PUF
// output for software to read.
//
// Plain mode: each write stores the whole WIDTH-bit response and marks the
// register valid. XOR-obfuscation mode: each query gives only WIDTH/2 bits;
// the first write fills the lower half and clears `valid`, the second write
// (a query with a different challenge) fills the upper half and sets `valid`.
// Which half is filled first is this design's choice. Changing mode restarts
// at the lower half.
// Interface: `we` is a one-cycle write strobe sampled on the rising clk edge;
// `xor_mode` selects the mode for that write. Synchronous active-low reset.
`timescale 1ps/1ps
module puf_srp
  import puf_pkg::*;
#(
  parameter int unsigned WIDTH = PUF_WIDTH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic               xor_mode,
  input  logic [WIDTH-1:0]   resp,
  input  logic [WIDTH/2-1:0] obf,
  output logic [WIDTH-1:0]   srp,
  output logic               valid
);

  logic upper_next;   // next XOR-mode write goes to the upper half

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      srp        <= '0;
      valid      <= 1'b0;
      upper_next <= 1'b0;
    end else if (we) begin
      if (!xor_mode) begin
        srp        <= resp;
        valid      <= 1'b1;
        upper_next <= 1'b0;
      end else if (!upper_next) begin
        srp[WIDTH/2-1:0] <= obf;
        valid            <= 1'b0;
        upper_next       <= 1'b1;
      end else begin
        srp[WIDTH-1:WIDTH/2] <= obf;
        valid                <= 1'b1;
        upper_next           <= 1'b0;
      end
    end
  end

endmodule
