// mont_io: Montgomery multiplier with its chip I/O registers.
//
// The operands a1, a2, b1, b2 and N (carry-save a and b, and the modulus) come
// in over five 32-bit ports, one word of each per clock, least significant word
// first, into n-bit input shift registers. When n/32 words have been taken the
// multiplier (mont5to2_new) is started automatically; when it finishes, S1 and
// S2 are copied into two output shift registers and clocked out 32 bits per
// clock, least significant word first, with out_valid high.
//
// Interface: in_valid qualifies the five input words; while the block is
// computing or unloading (busy) further input words are ignored. out_valid
// qualifies s1_w/s2_w. out_last marks the final output word.
//
// Timing: n/32 load clocks, then n+2 multiplier clocks, then n/32 output
// clocks. The 32-bit I/O width, the input/multiplier/output register split and
// the 1024-bit internal buses follow the document's I/O diagram; word order,
// the automatic start and the valid signals are this design's choices. The
// multiplier result is n+1 bits wide but, for inputs below 2N and N < 2^(n-2),
// it is below 2^(n-1), so n bits per vector are carried out.
module mont_io
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = 1024
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic [IO_W-1:0] a1_w,
  input  logic [IO_W-1:0] a2_w,
  input  logic [IO_W-1:0] b1_w,
  input  logic [IO_W-1:0] b2_w,
  input  logic [IO_W-1:0] n_w,
  output logic            out_valid,
  output logic            out_last,
  output logic [IO_W-1:0] s1_w,
  output logic [IO_W-1:0] s2_w,
  output logic            busy
);
  localparam int unsigned WORDS = N_BITS / IO_W;
  localparam int unsigned CW    = $clog2(WORDS + 1);

  typedef enum logic [1:0] {S_LOAD, S_MUL, S_OUT} io_state_e;

  io_state_e state;
  logic [CW-1:0] wcnt;
  logic [N_BITS-1:0] ra1, ra2, rb1, rb2, rn, ro1, ro2;
  logic [N_BITS:0]   s1, s2;
  logic              mul_start, mul_busy, mul_done;

  mont5to2_new #(.N_BITS(N_BITS)) u_mul (
    .clk(clk), .rst(rst), .start(mul_start),
    .a1(ra1), .a2(ra2), .b1(rb1), .b2(rb2), .n_mod(rn),
    .s1(s1), .s2(s2), .busy(mul_busy), .done(mul_done)
  );

  always_comb begin
    mul_start = (state == S_LOAD) && (wcnt == CW'(WORDS));
    out_valid = (state == S_OUT);
    out_last  = (state == S_OUT) && (wcnt == CW'(WORDS - 1));
    s1_w      = ro1[IO_W-1:0];
    s2_w      = ro2[IO_W-1:0];
    busy      = (state != S_LOAD);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LOAD;
      wcnt  <= '0;
      ra1 <= '0; ra2 <= '0; rb1 <= '0; rb2 <= '0; rn <= '0;
      ro1 <= '0; ro2 <= '0;
    end else begin
      unique case (state)
        S_LOAD: begin
          if (mul_start) begin
            state <= S_MUL;
            wcnt  <= '0;
          end else if (in_valid) begin
            ra1  <= {a1_w, ra1[N_BITS-1:IO_W]};
            ra2  <= {a2_w, ra2[N_BITS-1:IO_W]};
            rb1  <= {b1_w, rb1[N_BITS-1:IO_W]};
            rb2  <= {b2_w, rb2[N_BITS-1:IO_W]};
            rn   <= {n_w,  rn[N_BITS-1:IO_W]};
            wcnt <= wcnt + 1'b1;
          end
        end
        S_MUL: if (mul_done) begin
          ro1   <= s1[N_BITS-1:0];
          ro2   <= s2[N_BITS-1:0];
          state <= S_OUT;
        end
        S_OUT: begin
          ro1 <= ro1 >> IO_W;
          ro2 <= ro2 >> IO_W;
          if (wcnt == CW'(WORDS - 1)) begin
            wcnt  <= '0;
            state <= S_LOAD;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
