// Rectangular AW x BW multiplier of the normalization unit (57 x 32).
// The short operand b is radix-4 Booth recoded into 16 digits in {-2..2};
// each selects 0, +-a or +-2a as a partial product. A negative partial
// product is the one's complement of the multiple; its +1 is placed in the
// two empty low bits of the next partial product. The 16 partial products
// are reduced by three levels of 4:2 compressors (16 -> 8 -> 4 -> 2). A
// pipeline register sits between the tree and the final carry-propagate
// adder, as in the published design, so p is valid one cycle (one enabled edge)
// after a and b.
// All arithmetic is modulo 2^TW with TW = 64; the product of the normalized
// operands stays below 2^60, so it is exact. The +1 of the last digit has no
// slot and is dropped: b must be below 2^31 (it is below 2^30 here).
module rect_mult #(
  parameter int unsigned AW = 57,
  parameter int unsigned BW = 32,
  parameter int unsigned PW = 61
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [PW-1:0] p
);
  localparam int unsigned TW = 64;
  localparam int unsigned NPP = BW / 2;   // 16 partial products

  logic [TW-1:0] pp [NPP];
  logic [NPP-1:0] neg;

  // Booth recoding and partial-product selection
  always_comb begin
    logic [2:0] trip;
    logic [TW-1:0] mag;
    for (int i = 0; i < NPP; i++) begin
      trip = {b[2*i+1], b[2*i], (i == 0) ? 1'b0 : b[2*i-1]};
      unique case (trip)
        3'b001, 3'b010: mag = TW'(a);
        3'b011:         mag = TW'(a) << 1;
        3'b100:         mag = TW'(a) << 1;
        3'b101, 3'b110: mag = TW'(a);
        default:        mag = '0;
      endcase
      neg[i] = trip[2] & ~(trip[1] & trip[0]);
      pp[i]  = (neg[i] ? ~mag : mag) << (2 * i);
      if (i > 0) pp[i][2*i-2] = neg[i-1];
    end
  end

  // reduction tree: three levels of 4:2 compressors
  logic [TW-1:0] l1 [8];
  logic [TW-1:0] l2 [4];
  logic [TW-1:0] l3 [2];

  for (genvar g = 0; g < 4; g++) begin : g_lvl1
    csa42 #(.W(TW)) u_c (.a(pp[4*g]), .b(pp[4*g+1]), .c(pp[4*g+2]), .d(pp[4*g+3]),
                         .sum(l1[2*g]), .carry(l1[2*g+1]));
  end
  for (genvar g = 0; g < 2; g++) begin : g_lvl2
    csa42 #(.W(TW)) u_c (.a(l1[4*g]), .b(l1[4*g+1]), .c(l1[4*g+2]), .d(l1[4*g+3]),
                         .sum(l2[2*g]), .carry(l2[2*g+1]));
  end
  csa42 #(.W(TW)) u_lvl3 (.a(l2[0]), .b(l2[1]), .c(l2[2]), .d(l2[3]),
                          .sum(l3[0]), .carry(l3[1]));

  // pipeline register between tree and CPA
  logic [TW-1:0] ps_q, pc_q;
  always_ff @(posedge clk)
    if (en) begin
      ps_q <= l3[0];
      pc_q <= l3[1];
    end

  // final carry-propagate adder
  assign p = PW'(ps_q + pc_q);
endmodule
