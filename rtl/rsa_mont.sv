// rsa_mont: RSA modular exponentiation M = c^d mod N with two five-to-two
// carry-save Montgomery multipliers.
//
// Right-to-left square and multiply, operands kept in carry-save form
// (P1,P2 and R1,R2) throughout:
//     P0 = mont(K, c),  R0 = mont(K, 1)          pre-processing
//     for i = 0 .. E_BITS-1:
//        P = mont(P, P);  if d[i]: R = mont(R, P)  (both run side by side)
//     M1 + M2 = mont(1, R)                        post-processing
//     M = M1 + M2                                 final addition
// where mont(x, y) = x*y*2^-n mod N and K = 2^(2n) mod N is supplied by the
// host (k_const). The squaring multiplier and the R multiplier run in parallel,
// so each step costs one multiplication time, n+2 clocks. The R multiplier
// runs in every loop step; its result is simply not taken when d[i] = 0. The
// final addition shifts M1 and M2 through a barrel register full adder, one
// bit per clock, also in n+2 clocks.
//
// Interface: present c_in (< N), d_in, n_mod (odd, < 2^(n-2)) and k_const and
// pulse start for one clock. They must stay stable until done. done pulses for
// one clock when m_out holds the result; m_out stays valid until the next
// start. phase shows the current phase.
//
// Timing: (n+2)*(E_BITS+3) clocks from the start edge to the edge that raises
// done, the count given for the whole RSA operation. The algorithm, the
// parallel pair of multipliers and the cycle budget follow the document; the
// handshake, the host-supplied K and the modulus range limit are this design's
// own choices.
module rsa_mont
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 1024,
  parameter int unsigned E_BITS = 512
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [N_BITS-1:0] c_in,
  input  logic [E_BITS-1:0] d_in,
  input  logic [N_BITS-1:0] n_mod,
  input  logic [N_BITS-1:0] k_const,
  output logic [N_BITS-1:0] m_out,
  output logic              busy,
  output logic              done,
  output mont_phase_e       phase
);
  localparam int unsigned EW = (E_BITS > 1) ? $clog2(E_BITS) : 1;
  localparam int unsigned FW = $clog2(N_BITS + 1);

  typedef logic [N_BITS-1:0] word_t;

  mont_phase_e ph;
  logic [EW-1:0] idx;
  logic [FW-1:0] fcnt;
  logic          take_r;
  word_t         bp1, bp2, br1, br2, rr1, rr2;

  // multiplier control and operands
  logic        st_p, st_r;
  word_t       ap1, ap2, ar1, ar2;
  logic [N_BITS:0] sp1, sp2, sr1, sr2;
  logic        busy_p, busy_r, done_p, done_r;
  word_t       new_r1, new_r2;
  logic        last_bit;

  // final adder
  logic        fa_load, fa_bit;

  mont5to2_new #(.N_BITS(N_BITS)) u_mul_p (
    .clk(clk), .rst(rst), .start(st_p),
    .a1(ap1), .a2(ap2), .b1(bp1), .b2(bp2), .n_mod(n_mod),
    .s1(sp1), .s2(sp2), .busy(busy_p), .done(done_p)
  );

  mont5to2_new #(.N_BITS(N_BITS)) u_mul_r (
    .clk(clk), .rst(rst), .start(st_r),
    .a1(ar1), .a2(ar2), .b1(br1), .b2(br2), .n_mod(n_mod),
    .s1(sr1), .s2(sr2), .busy(busy_r), .done(done_r)
  );

  brfa #(.W(N_BITS)) u_final_add (
    .clk(clk), .rst(rst), .load(fa_load), .advance(ph == PH_FINAL),
    .zero_out(1'b0), .a1(sr1[N_BITS-1:0]), .a2(sr2[N_BITS-1:0]), .bit_o(fa_bit)
  );

  // The value of R going into the next step: the multiplier's new result if
  // the previous exponent bit asked for it, the old R otherwise.
  always_comb begin
    new_r1   = take_r ? sr1[N_BITS-1:0] : rr1;
    new_r2   = take_r ? sr2[N_BITS-1:0] : rr2;
    last_bit = (idx == EW'(E_BITS - 1));
  end

  always_comb begin
    st_p    = 1'b0;
    st_r    = 1'b0;
    fa_load = 1'b0;
    ap1     = sp1[N_BITS-1:0];
    ap2     = sp2[N_BITS-1:0];
    ar1     = new_r1;
    ar2     = new_r2;
    unique case (ph)
      PH_IDLE: begin
        ap1 = k_const;  ap2 = '0;
        ar1 = k_const;  ar2 = '0;
        st_p = start;
        st_r = start;
      end
      PH_PRE: begin
        st_p = done_r;
        st_r = done_r;
      end
      PH_LOOP: begin
        if (last_bit) begin
          ar1 = word_t'(1);  ar2 = '0;
          st_r = done_r;
        end else begin
          st_p = done_r;
          st_r = done_r;
        end
      end
      PH_POST:  fa_load = done_r;
      PH_FINAL: ;
      default:  ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph     <= PH_IDLE;
      idx    <= '0;
      fcnt   <= '0;
      take_r <= 1'b0;
      bp1 <= '0; bp2 <= '0; br1 <= '0; br2 <= '0; rr1 <= '0; rr2 <= '0;
      m_out  <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (ph)
        PH_IDLE: if (start) begin
          bp1 <= c_in;           bp2 <= '0;
          br1 <= word_t'(1);     br2 <= '0;
          take_r <= 1'b1;
          ph  <= PH_PRE;
        end
        PH_PRE: if (done_r) begin
          bp1 <= sp1[N_BITS-1:0]; bp2 <= sp2[N_BITS-1:0];
          br1 <= sp1[N_BITS-1:0]; br2 <= sp2[N_BITS-1:0];
          rr1 <= new_r1;          rr2 <= new_r2;
          take_r <= d_in[0];
          idx <= '0;
          ph  <= PH_LOOP;
        end
        PH_LOOP: if (done_r) begin
          rr1 <= new_r1;  rr2 <= new_r2;
          if (last_bit) begin
            br1 <= new_r1;  br2 <= new_r2;
            ph  <= PH_POST;
          end else begin
            bp1 <= sp1[N_BITS-1:0]; bp2 <= sp2[N_BITS-1:0];
            br1 <= sp1[N_BITS-1:0]; br2 <= sp2[N_BITS-1:0];
            take_r <= d_in[idx + 1'b1];
            idx <= idx + 1'b1;
          end
        end
        PH_POST: if (done_r) begin
          fcnt <= '0;
          ph   <= PH_FINAL;
        end
        PH_FINAL: begin
          fcnt <= fcnt + 1'b1;
          if (fcnt < FW'(N_BITS)) begin
            m_out <= {fa_bit, m_out[N_BITS-1:1]};
          end else begin
            done <= 1'b1;
            ph   <= PH_IDLE;
          end
        end
        default: ph <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    busy  = (ph != PH_IDLE);
    phase = ph;
  end

  // The two multipliers are always started together, so they finish together.
  always_ff @(posedge clk)
    if (!rst) a_mul_sync: assert (!done_p || done_r);
endmodule
