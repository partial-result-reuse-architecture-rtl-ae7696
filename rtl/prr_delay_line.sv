// Delay line of LEN delay elements ("LEN T" in the architecture drawings).
//
// The PRR datapaths reuse partial results computed LEN pixels earlier in the
// raster scan; a delay of W elements moves a value one image row. For the
// prototype the delay lines are shift registers, as the document recommends
// when power is not a concern (a RAM would be smaller but needs a controller).
//
// Interface: d_i enters, q_o leaves LEN accepted samples later. The line
// shifts on the rising clock edge when en_i is high, so a stalled input stream
// keeps the row alignment. LEN = 0 is a plain wire. The stages are not reset:
// the datapath only produces meaningful output once a full window of real
// pixels has entered, so the start-up contents are never used. The clock
// enable and the absence of reset are choices of this design.
module prr_delay_line #(
  parameter int unsigned DW  = 8,
  parameter int unsigned LEN = 1
) (
  input  logic          clk_i,
  input  logic          en_i,
  input  logic [DW-1:0] d_i,
  output logic [DW-1:0] q_o
);

  if (LEN == 0) begin : g_wire
    assign q_o = d_i;
  end else begin : g_sr
    logic [DW-1:0] sr [LEN];
    always_ff @(posedge clk_i) begin
      if (en_i) begin
        sr[0] <= d_i;
        for (int unsigned i = 1; i < LEN; i++) sr[i] <= sr[i-1];
      end
    end
    assign q_o = sr[LEN-1];
  end

endmodule
