// glg_mzi -- the GLG gate built from all-optical parts: eleven MZI switches,
// one constant light source and four three-input beam combiners.
//
// How it works. Each GLG output is written as a sum of three mutually
// exclusive product terms, so that a beam combiner can add them without two
// lit inputs ever meeting:
//   P = A'B'D' + AD + A'BD      Q = A'BD' + AD + A'B'D
//   R = AB'D'  + A'D + ABD      S = ABC'  + A'C + AB'C
// An MZI switch with incoming x and control y gives x.y (bar) and x.y'
// (cross), so each product is a chain of switches:
//   level 1: light(1) ctl A -> A'      A ctl B -> AB, AB'
//            D ctl A -> DA, DA'        C ctl A -> CA'
//   level 2: A' ctl B -> A'B, A'B'
//   level 3: A'B' ctl D, A'B ctl D, AB' ctl D, AB ctl D, AB ctl C, AB' ctl C
// The switch outputs not used by any combiner are left dark-dumped (the
// optical equivalent of a terminated port). An output that feeds two
// switches or combiners stands for an optical splitter.
//
// Interface: a, b, c, d -> p, q, r, s, the same function as glg_gate.
// Timing: combinational; in units of one MZI delay the deepest path
// (light -> A' -> A'B' -> A'B'D') is three switches plus a combiner.
//
// The part count (11 switches, 4 combiners of 3 inputs) and the switches fed
// by (A,B), (D,A), (C,A) and (constant light, A) follow the published optical
// layout. The wiring of the remaining switches is derived here from the gate
// equations above.
module glg_mzi (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  localparam logic LIGHT = 1'b1;  // continuous-wave source

  // Level 1
  logic a_lit, na;        // A, A'
  logic t_ab, t_abn;      // AB, AB'
  logic t_da, t_dna;      // DA, DA'
  logic t_ca, t_cna;      // CA, CA'
  // Level 2
  logic t_nab, t_nanb;    // A'B, A'B'
  // Level 3
  logic t_nanb_d, t_nanb_nd;  // A'B'D, A'B'D'
  logic t_nab_d,  t_nab_nd;   // A'BD,  A'BD'
  logic t_abn_d,  t_abn_nd;   // AB'D,  AB'D'
  logic t_ab_d,   t_ab_nd;    // ABD,   ABD'
  logic t_ab_c,   t_ab_nc;    // ABC,   ABC'
  logic t_abn_c,  t_abn_nc;   // AB'C,  AB'C'

  mzi_switch u_mzi_na   (.in_sig(LIGHT),  .ctrl(a), .bar_port(a_lit),    .cross_port(na));
  mzi_switch u_mzi_ab   (.in_sig(a),      .ctrl(b), .bar_port(t_ab),     .cross_port(t_abn));
  mzi_switch u_mzi_da   (.in_sig(d),      .ctrl(a), .bar_port(t_da),     .cross_port(t_dna));
  mzi_switch u_mzi_ca   (.in_sig(c),      .ctrl(a), .bar_port(t_ca),     .cross_port(t_cna));
  mzi_switch u_mzi_nab  (.in_sig(na),     .ctrl(b), .bar_port(t_nab),    .cross_port(t_nanb));
  mzi_switch u_mzi_nanb_d (.in_sig(t_nanb), .ctrl(d), .bar_port(t_nanb_d), .cross_port(t_nanb_nd));
  mzi_switch u_mzi_nab_d  (.in_sig(t_nab),  .ctrl(d), .bar_port(t_nab_d),  .cross_port(t_nab_nd));
  mzi_switch u_mzi_abn_d  (.in_sig(t_abn),  .ctrl(d), .bar_port(t_abn_d),  .cross_port(t_abn_nd));
  mzi_switch u_mzi_ab_d   (.in_sig(t_ab),   .ctrl(d), .bar_port(t_ab_d),   .cross_port(t_ab_nd));
  mzi_switch u_mzi_ab_c   (.in_sig(t_ab),   .ctrl(c), .bar_port(t_ab_c),   .cross_port(t_ab_nc));
  mzi_switch u_mzi_abn_c  (.in_sig(t_abn),  .ctrl(c), .bar_port(t_abn_c),  .cross_port(t_abn_nc));

  beam_combiner #(.N(3)) u_comb_p (.beams({t_nanb_nd, t_da,  t_nab_d}),  .out(p));
  beam_combiner #(.N(3)) u_comb_q (.beams({t_nab_nd,  t_da,  t_nanb_d}), .out(q));
  beam_combiner #(.N(3)) u_comb_r (.beams({t_abn_nd,  t_dna, t_ab_d}),   .out(r));
  beam_combiner #(.N(3)) u_comb_s (.beams({t_ab_nc,   t_cna, t_abn_c}),  .out(s));

  // Dark-dumped switch outputs: a_lit, t_ca, t_abn_d, t_ab_nd, t_ab_c,
  // t_abn_nc carry light that no combiner collects.

endmodule
