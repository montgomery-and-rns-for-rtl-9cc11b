// rns_exp: RSA exponentiation c = a^e mod N in residue form, a sequencer around
// one RNS Montgomery multiplier (rns_mm).
//
// What it does: with a given as residues (a < N) and Q = M^2 mod N given as
// residues (M = product of base B), it returns a value congruent to
// a^e mod N and below (K+1)N, as residues in B, B' and the redundant modulus.
//
// How it works: left-to-right square and multiply on Montgomery forms,
// MM(x, y) = x*y*M^-1 mod N:
//   abar = MM(a, Q)            a in Montgomery form
//   cbar = MM(Q, 1)            = M mod N, the Montgomery form of 1
//   for i = E-1 downto 0:  cbar = MM(cbar, cbar);  if e[i]: cbar = MM(abar, cbar)
//   c    = MM(cbar, 1)         back to ordinary form
// Every MM result stays below (K+1)N, which keeps every later product inside
// the multiplier's a*b < M*N limit. The multiplier's operand inputs are
// selected from the abar/cbar registers, the inputs a and Q, and the constant
// 1 by the current step.
//
// Interface: moduli and constants as in rns_mm (passed through), a_* and q_*
// residues, exponent e (E bits). All must be held from start until done.
// start is taken when idle; done pulses for one clock with r_* valid, and r_*
// hold until the next result.
//
// Timing: each multiplication takes 2K+5 clocks here (2K+4 in rns_mm and one
// to hand over to the next), and there are E + w + 3 of them, w = number of
// one bits in e. done goes high (E+w+3)(2K+5) clocks after the edge that
// takes start (the start clock plus (E+w+3)(2K+5) more). The run time
// depends on w.
//
// From the document: the RSA loop (left-to-right, square then conditional
// multiply, conversion in with r replaced by M and out with MM(c, 1)) and the
// use of the RNS Montgomery multiplier for Monpro. This design's own choices:
// Q = M^2 mod N supplied by the host, the Montgomery form of 1 computed as
// MM(Q, 1), one multiplier used sequentially, and the handshakes. Not built:
// the exact mixed-radix base extension for the last call, the conversion back
// to binary and the final reduction below N; the result is left in residue
// form, below (K+1)N.
module rns_exp #(
  parameter int unsigned K = 10,   // moduli per base
  parameter int unsigned W = 7,    // residue width
  parameter int unsigned E_BITS = 512
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [E_BITS-1:0] e,
  input  logic [K*W-1:0]    mod_b,
  input  logic [K*W-1:0]    mod_bp,
  input  logic [W-1:0]      mod_r,
  input  logic [K*W-1:0]    a_b,
  input  logic [K*W-1:0]    a_bp,
  input  logic [W-1:0]      a_r,
  input  logic [K*W-1:0]    q_b,     // M^2 mod N, residues
  input  logic [K*W-1:0]    q_bp,
  input  logic [W-1:0]      q_r,
  input  logic [K*W-1:0]    k1_b,
  input  logic [K*W-1:0]    k1_bp,
  input  logic [W-1:0]      k1_r,
  input  logic [K*K*W-1:0]  k2_bp,
  input  logic [K*W-1:0]    k2_r,
  input  logic [K*K*W-1:0]  k3_b,
  input  logic [K*W-1:0]    k3_r,
  input  logic [W-1:0]      k4_r,
  input  logic [K*W-1:0]    k5_b,
  input  logic [K*W-1:0]    k5_bp,
  output logic [K*W-1:0]    r_b,
  output logic [K*W-1:0]    r_bp,
  output logic [W-1:0]      r_r,
  output logic              busy,
  output logic              done
);
  localparam int unsigned IW = (E_BITS > 1) ? $clog2(E_BITS) : 1;
  localparam int unsigned NW = (2 * K + 1) * W;  // one value, all channels

  typedef enum logic [2:0] {
    X_IDLE = 3'd0,
    X_PREA = 3'd1,  // abar = MM(a, Q)
    X_PREC = 3'd2,  // cbar = MM(Q, 1)
    X_SQ   = 3'd3,  // cbar = MM(cbar, cbar)
    X_MUL  = 3'd4,  // cbar = MM(abar, cbar)
    X_POST = 3'd5   // c = MM(cbar, 1)
  } step_e;

  step_e          step;
  logic [IW-1:0]  idx;
  logic           go;
  logic [NW-1:0]  abar, cbar, one_v, a_v, q_v, opx, opy, res_v;
  logic           mm_done, mm_busy;

  // values packed as {r, B', B}
  always_comb begin
    one_v = '0;
    for (int unsigned i = 0; i < 2 * K + 1; i++) one_v[i*W] = 1'b1;
  end
  assign a_v = {a_r, a_bp, a_b};
  assign q_v = {q_r, q_bp, q_b};

  always_comb begin
    unique case (step)
      X_PREA:  begin opx = a_v;  opy = q_v;   end
      X_PREC:  begin opx = q_v;  opy = one_v; end
      X_SQ:    begin opx = cbar; opy = cbar;  end
      X_MUL:   begin opx = abar; opy = cbar;  end
      X_POST:  begin opx = cbar; opy = one_v; end
      default: begin opx = a_v;  opy = q_v;   end
    endcase
  end

  logic [K*W-1:0] mr_b, mr_bp;
  logic [W-1:0]   mr_r;

  rns_mm #(.K(K), .W(W)) u_mm (
    .clk(clk), .rst(rst), .start(go),
    .mod_b(mod_b), .mod_bp(mod_bp), .mod_r(mod_r),
    .a_b(opx[0 +: K*W]), .a_bp(opx[K*W +: K*W]), .a_r(opx[2*K*W +: W]),
    .b_b(opy[0 +: K*W]), .b_bp(opy[K*W +: K*W]), .b_r(opy[2*K*W +: W]),
    .k1_b(k1_b), .k1_bp(k1_bp), .k1_r(k1_r), .k2_bp(k2_bp), .k2_r(k2_r),
    .k3_b(k3_b), .k3_r(k3_r), .k4_r(k4_r), .k5_b(k5_b), .k5_bp(k5_bp),
    .r_b(mr_b), .r_bp(mr_bp), .r_r(mr_r), .busy(mm_busy), .done(mm_done)
  );
  assign res_v = {mr_r, mr_bp, mr_b};

  always_ff @(posedge clk) begin
    if (rst) begin
      step <= X_IDLE;
      idx  <= '0;
      go   <= 1'b0;
      done <= 1'b0;
      abar <= '0;
      cbar <= '0;
      r_b  <= '0;
      r_bp <= '0;
      r_r  <= '0;
    end else begin
      go   <= 1'b0;
      done <= 1'b0;
      unique case (step)
        X_IDLE: if (start) begin
          step <= X_PREA;
          go   <= 1'b1;
        end
        X_PREA: if (mm_done) begin
          abar <= res_v;
          step <= X_PREC;
          go   <= 1'b1;
        end
        X_PREC: if (mm_done) begin
          cbar <= res_v;
          idx  <= IW'(E_BITS - 1);
          step <= X_SQ;
          go   <= 1'b1;
        end
        X_SQ: if (mm_done) begin
          cbar <= res_v;
          go   <= 1'b1;
          if (e[idx]) begin
            step <= X_MUL;
          end else if (idx == '0) begin
            step <= X_POST;
          end else begin
            idx <= idx - 1'b1;
          end
        end
        X_MUL: if (mm_done) begin
          cbar <= res_v;
          go   <= 1'b1;
          if (idx == '0) begin
            step <= X_POST;
          end else begin
            idx  <= idx - 1'b1;
            step <= X_SQ;
          end
        end
        X_POST: if (mm_done) begin
          {r_r, r_bp, r_b} <= res_v;
          done <= 1'b1;
          step <= X_IDLE;
        end
        default: step <= X_IDLE;
      endcase
    end
  end

  assign busy = (step != X_IDLE) || mm_busy;
endmodule
