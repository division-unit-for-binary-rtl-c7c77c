// Normalization unit: turns the BID significands Mx and Md into the
// normalized operands of the recurrence, using one shared datapath.
//
// Stage 1 (one cycle per operand): mx_xd picks the significand M (1 = divisor),
// the leading-one detector counts its leading zeros (+5 for the divisor), the
// table gives e and pt = 10^e, and th = (M >= 2^30) steers the wider of M and
// pt to the 57-bit multiplicand register RMX and the other to the 32-bit
// multiplier register RMY. e is kept with the operand.
// Stage 2 (two cycles, the multiplier is pipelined): P = RMX * RMY.
// For the divisor, P[59] = 1 means d overflowed its 59-bit range; this is
// remembered in db2 and, in the published design, both d and x are then halved.
// Halving x can drop an odd bit, so this design keeps that bit instead: it
// stores 2d and 2x (P << 1 when db2 = 0, P itself when db2 = 1). The ratio is
// exactly x/d and the top 7 bits of d_o are the 7 MSBs of the 59-bit d.
//
// Control (from the controller, divisor first so db2 is known for x):
//   cycle 1: mx_xd=1, ld_rm           (stage 1 of d)
//   cycle 2: mx_xd=0, ld_rm, mul_en   (stage 1 of x, tree of d)
//   cycle 3: mul_en, ld_d             (tree of x, CPA of d -> d_o, db2)
//   cycle 4: ld_x                     (CPA of x -> x_o)
// Ranges: x_o in [0.1*2^55, 2^56), d_o in [0.1*2^60, 2^60).
module norm_unit
  import bid_div_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [MW-1:0]   m_x,
  input  logic [MW-1:0]   m_d,
  input  logic            mx_xd,
  input  logic            ld_rm,
  input  logic            mul_en,
  input  logic            ld_d,
  input  logic            ld_x,
  output logic [XW-1:0]   x_o,
  output logic [DW-1:0]   d_o,
  output logic            db2,
  output logic [EXPW-1:0] ex_o,
  output logic [EXPW-1:0] ed_o
);
  logic [MW-1:0]   m;
  logic [LZW-1:0]  lz;
  logic            th;
  logic [EXPW-1:0] e;
  logic [PTW-1:0]  pt;
  logic [PTW-1:0]  rmx;
  logic [MYW-1:0]  rmy;
  logic [PW-1:0]   p;

  assign m = mx_xd ? m_d : m_x;

  lod u_lod (.m(m), .is_div(mx_xd), .lz(lz), .th(th));
  pow10_table u_tab (.lz(lz), .e(e), .pt(pt));

  // operand swap and stage-1 registers
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rmx  <= '0;
      rmy  <= '0;
      ex_o <= '0;
      ed_o <= '0;
    end else if (ld_rm) begin
      rmx <= th ? PTW'(m) : pt;
      rmy <= th ? MYW'(pt) : MYW'(m);
      if (mx_xd) ed_o <= e;
      else       ex_o <= e;
    end

  rect_mult #(.AW(PTW), .BW(MYW), .PW(PW)) u_mult (
    .clk(clk), .en(mul_en), .a(rmx), .b(rmy), .p(p));

  // conditional halving, kept exact by storing twice the value
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_o <= '0;
      db2 <= 1'b0;
      x_o <= '0;
    end else begin
      if (ld_d) begin
        db2 <= p[DW-1];
        d_o <= p[DW-1] ? p[DW-1:0] : {p[DW-2:0], 1'b0};
      end
      if (ld_x)
        x_o <= db2 ? p[XW-1:0] : {p[XW-2:0], 1'b0};
    end
endmodule
