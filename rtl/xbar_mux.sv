// xbar_mux: one output column of the crossbar, a 5:1 multiplexer.
//
// Five DATA_W-bit inputs in1..in5 and a 3-bit select, as in the crossbar's
// RTL view. Select value k (0..4) passes input in(k+1) to y; the three
// unused select codes (5..7) give zero. The mapping of select codes to
// inputs is this design's choice. Combinational.
module xbar_mux #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] in1,
  input  logic [DATA_W-1:0] in2,
  input  logic [DATA_W-1:0] in3,
  input  logic [DATA_W-1:0] in4,
  input  logic [DATA_W-1:0] in5,
  input  logic [2:0]        sel,
  output logic [DATA_W-1:0] y
);
  always_comb begin
    unique case (sel)
      3'd0:    y = in1;
      3'd1:    y = in2;
      3'd2:    y = in3;
      3'd3:    y = in4;
      3'd4:    y = in5;
      default: y = '0;
    endcase
  end
endmodule
