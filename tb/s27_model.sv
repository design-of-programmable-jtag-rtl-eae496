// s27_model: behavioural model of the ISCAS'89 s27 benchmark circuit, used as
// the core behind the JTAG controller in the end-to-end test.
//
// Four inputs G0..G3, one output G17, three D flip-flops G5, G6, G7 clocked by
// clk. Gate equations of the published s27 netlist:
//   G14 = !G0, G8 = G14 & G6, G12 = !(G1 | G7), G15 = G12 | G8, G16 = G3 | G8,
//   G9 = !(G16 & G15), G10 = !(G14 | G11), G11 = !(G5 | G9),
//   G13 = !(G2 | G12), G17 = !G11; next G5 = G10, G6 = G11, G7 = G13.
// state = {G7, G6, G5} is the internal register the PRIVATE instruction reads.
module s27_model (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] g_in,     // {G3, G2, G1, G0}
  output logic       g17,
  output logic [2:0] state     // {G7, G6, G5}
);
  logic g0, g1, g2, g3, g5, g6, g7;
  logic g8, g9, g10, g11, g12, g13, g14, g15, g16;

  assign {g3, g2, g1, g0} = g_in;
  assign {g7, g6, g5} = state;

  assign g14 = ~g0;
  assign g8  = g14 & g6;
  assign g12 = ~(g1 | g7);
  assign g15 = g12 | g8;
  assign g16 = g3 | g8;
  assign g9  = ~(g16 & g15);
  assign g11 = ~(g5 | g9);
  assign g10 = ~(g14 | g11);
  assign g13 = ~(g2 | g12);
  assign g17 = ~g11;

  always_ff @(posedge clk) begin
    if (rst) state <= '0;
    else     state <= {g13, g11, g10};
  end
endmodule
