// MAX cell: one two-input semigroup operator with an optional output register.
//
// The PRR architecture is built from a single kind of cell, a comparator that
// keeps the larger (dilation) or smaller (erosion) of two pixels. In the
// prototype chip each such cell carries its own 8-bit pipeline register, so a
// chain of cells can run fully pipelined. The same cell with OP = OP_ADD is
// the adder of the moving-average filter.
//
// Interface: a_i, b_i operands; y_o result. With REG = 1 the result is
// registered on the rising clock edge when en_i is high (one cycle of latency);
// with REG = 0 the cell is purely combinational and clk_i, rst_ni and en_i are
// unused. The register is cleared by the active-low synchronous reset.
// The MAX/MIN function and the 8-bit register follow the document; the ADD
// option, the clock enable and the reset are choices of this design.
module prr_op_unit
  import prr_pkg::*;
#(
  parameter int unsigned DW  = 8,
  parameter prr_op_e     OP  = OP_MAX,
  parameter bit          REG = 1'b1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          en_i,
  input  logic [DW-1:0] a_i,
  input  logic [DW-1:0] b_i,
  output logic [DW-1:0] y_o
);

  logic [DW-1:0] res;

  always_comb begin
    unique case (OP)
      OP_MAX:  res = (a_i >= b_i) ? a_i : b_i;
      OP_MIN:  res = (a_i <= b_i) ? a_i : b_i;
      default: res = a_i + b_i;
    endcase
  end

  if (REG) begin : g_reg
    logic [DW-1:0] q;
    always_ff @(posedge clk_i) begin
      if (!rst_ni)   q <= '0;
      else if (en_i) q <= res;
    end
    assign y_o = q;
  end else begin : g_comb
    assign y_o = res;
  end

endmodule
