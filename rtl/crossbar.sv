// crossbar: 5x5 switch connecting router inputs to router outputs.
//
// Five xbar_mux instances, one per output port, each choosing among all five
// inputs with its own 3-bit select, as the crossbar's RTL view shows (inputs
// in0..in4, selects sel0..sel4, outputs out0..out4). The selects come from
// the arbiters' grants. Output k carries input sel[k]. Several outputs may
// select the same input. Combinational.
module crossbar #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [4:0][DATA_W-1:0] in,
  input  logic [4:0][2:0]        sel,
  output logic [4:0][DATA_W-1:0] out
);
  for (genvar o = 0; o < 5; o++) begin : g_col
    xbar_mux #(.DATA_W(DATA_W)) u_mux (
      .in1(in[0]), .in2(in[1]), .in3(in[2]), .in4(in[3]), .in5(in[4]),
      .sel(sel[o]), .y(out[o])
    );
  end
endmodule
