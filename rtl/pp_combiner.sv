// pp_combiner: adds the four partial products of a partitioned multiplier.
// With a = {a_hi, a_lo} and b = {b_hi, b_lo} split into H-bit halves,
//   a*b = p_ll + (p_hl + p_lh) << H + p_hh << 2H.
// The adder network is the one of the 32x32 design built from four 16x16
// multipliers (H = 16), reused unchanged at every level of the recursion:
//
//  right pair (3H bits)  r = p_ll + p_hl << H
//    low H bits   : p_ll[H-1:0], passed through
//    middle H bits: H-bit ripple adder  p_ll[2H-1:H] + p_hl[H-1:0]  -> c_r
//    top H bits   : p_hl[2H-1:H] or p_hl[2H-1:H]+1 (H-bit half-adder chain),
//                   picked by a multiplexer on c_r (carry select)
//  left pair (2H bits plus a carry)  l = p_lh + p_hh << H
//    low H bits   : p_lh[H-1:0]
//    next H bits  : H-bit ripple adder  p_lh[2H-1:H] + p_hh[H-1:0]  -> c_l
//    (its top H bits p_hh[2H-1:H] + c_l are folded into the last stage)
//  final sum (shift l by H and add r)
//    p[H-1:0]     : r[H-1:0]
//    p[2H-1:H]    : H-bit ripple adder  l[H-1:0] + r[2H-1:H]        -> c0
//    p[3H-1:2H]   : H-bit CLA           l[2H-1:H] + r[3H-1:2H] + c0 -> c_cla
//    p[3H]        : one full adder  p_hh[H] + c_l + c_cla           -> S, C
//    p[4H-1:3H+1] : p_hh[2H-1:H+1] or that plus one ((H-1)-bit half-adder
//                   chain), picked by a multiplexer on C
// The ripple adders get their operands early or bit by bit in sequence; the
// CLA, whose operands arrive together and last, is the one fast adder. With
// USE_CLA = 0 (or H not a multiple of 4) the CLA is replaced by a ripple
// adder. Which of the two same-sized cross products sits in which pair is
// this design's choice; the sum is the same either way.
// Interface: four 2H-bit products in, 4H-bit product out. Combinational.
module pp_combiner #(
  parameter int unsigned H       = 16,
  parameter bit          USE_CLA = 1'b1
) (
  input  logic [2*H-1:0] p_ll,   // a_lo * b_lo
  input  logic [2*H-1:0] p_hl,   // a_hi * b_lo
  input  logic [2*H-1:0] p_lh,   // a_lo * b_hi
  input  logic [2*H-1:0] p_hh,   // a_hi * b_hi
  output logic [4*H-1:0] p
);
  // ---------------- right pair ----------------
  logic [H-1:0]   r_mid, r_top, r_top_inc;
  logic           c_r, r_inc_co;
  logic [3*H-1:0] r;

  rc_adder #(.W(H)) u_rpair_add (
    .x(p_ll[2*H-1:H]), .y(p_hl[H-1:0]), .cin(1'b0), .s(r_mid), .cout(c_r));
  ha_incrementer #(.W(H)) u_rpair_inc (
    .x(p_hl[2*H-1:H]), .s(r_top_inc), .cout(r_inc_co));
  mux2 #(.W(H)) u_rpair_mux (
    .d0(p_hl[2*H-1:H]), .d1(r_top_inc), .sel(c_r), .y(r_top));

  assign r = {r_top, r_mid, p_ll[H-1:0]};

  // ---------------- left pair ----------------
  logic [H-1:0]   l_mid;
  logic           c_l;
  logic [2*H-1:0] l;

  rc_adder #(.W(H)) u_lpair_add (
    .x(p_lh[2*H-1:H]), .y(p_hh[H-1:0]), .cin(1'b0), .s(l_mid), .cout(c_l));

  assign l = {l_mid, p_lh[H-1:0]};

  // ---------------- final sum ----------------
  logic [H-1:0]   f_lo, f_hi;
  logic           c0, c_cla;

  rc_adder #(.W(H)) u_final_rc (
    .x(l[H-1:0]), .y(r[2*H-1:H]), .cin(1'b0), .s(f_lo), .cout(c0));

  if (USE_CLA && (H % 4 == 0)) begin : g_cla
    cla_adder #(.W(H)) u_final_cla (
      .x(l[2*H-1:H]), .y(r[3*H-1:2*H]), .cin(c0), .s(f_hi), .cout(c_cla));
  end else begin : g_rc
    rc_adder #(.W(H)) u_final_cla (
      .x(l[2*H-1:H]), .y(r[3*H-1:2*H]), .cin(c0), .s(f_hi), .cout(c_cla));
  end

  // top H bits: p_hh[2H-1:H] + c_l + c_cla
  logic         top_s, top_c, t_inc_co;
  logic [H-2:0] t_up, t_up_inc;

  full_adder u_top_fa (
    .a(p_hh[H]), .b(c_l), .ci(c_cla), .s(top_s), .co(top_c));
  ha_incrementer #(.W(H-1)) u_top_inc (
    .x(p_hh[2*H-1:H+1]), .s(t_up_inc), .cout(t_inc_co));
  mux2 #(.W(H-1)) u_top_mux (
    .d0(p_hh[2*H-1:H+1]), .d1(t_up_inc), .sel(top_c), .y(t_up));

  assign p = {t_up, top_s, f_hi, f_lo, r[H-1:0]};

  // The incrementer carries out only when its input is all ones; the
  // product bounds make the selected path never overflow, so the two
  // incrementer carry outputs are not used.

  initial assert (H >= 2)
    else $error("pp_combiner: H=%0d must be at least 2", H);
endmodule
