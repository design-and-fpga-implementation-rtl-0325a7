// alu: the hash processor's arithmetic logic unit. It performs one SHA-1
// round, one SHA-256 round, or a 32-bit add, subtract, AND or OR.
//
// 'sel' picks the operation:
//   SEL_SHA1 (000): T = ROTL5(A) + f_t(B,C,D) + E + W + K, with f_t = Ch for
//                   rounds 0-19, Parity for 20-39, Maj for 40-59 and Parity
//                   for 60-79. The new variables are
//                   A..E = T, A, ROTL30(B), C, D. F, G and H pass through.
//   SEL_SHA2 (001): T1 = H + Sigma1(E) + Ch(E,F,G) + K + W,
//                   T2 = Sigma0(A) + Maj(A,B,C). The new variables are
//                   A..H = T1+T2, A, B, C, D+T1, E, F, G.
//   SEL_ADD/SUB/AND/OR (010-101): alu_out = acc_in op mem_data.
// All results are registered: on a rising edge with 'alu_e' high, a round
// operation loads the eight chaining-variable outputs and an arithmetic or
// logic operation loads 'alu_out' and 'alu_sign'. alu_sign is 1 when the
// result is positive, that is nonzero with a clear sign bit, and 0
// otherwise. With 'alu_e' low every output holds. Reset clears them all.
// The operations, the select codes and the ports follow the document; the
// register on the outputs (the ALU has a clock port), the array form of the
// eight variables and the exact alu_sign rule for negative results are this
// design's choices.
module alu
  import hp_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               alu_e,
  input  logic [ROUND_W-1:0] round,
  input  alusel_e            sel,
  input  word_t              acc_in,
  input  word_t              mem_data,
  input  word_t              v_in  [8],   // A, B, C, D, E, F, G, H
  input  word_t              k,
  input  word_t              w,
  output logic               alu_sign,
  output word_t              alu_out,
  output word_t              v_out [8]    // A_out .. H_out
);

  word_t sha1_next [8];
  word_t sha2_next [8];
  word_t f1, t1, t2, tsha1, arith;

  always_comb begin
    if (round < 7'd20)      f1 = f_ch    (v_in[1], v_in[2], v_in[3]);
    else if (round < 7'd40) f1 = f_parity(v_in[1], v_in[2], v_in[3]);
    else if (round < 7'd60) f1 = f_maj   (v_in[1], v_in[2], v_in[3]);
    else                    f1 = f_parity(v_in[1], v_in[2], v_in[3]);
    tsha1 = rotl(v_in[0], 5) + f1 + v_in[4] + w + k;
    sha1_next[0] = tsha1;
    sha1_next[1] = v_in[0];
    sha1_next[2] = rotl(v_in[1], 30);
    sha1_next[3] = v_in[2];
    sha1_next[4] = v_in[3];
    sha1_next[5] = v_in[5];
    sha1_next[6] = v_in[6];
    sha1_next[7] = v_in[7];

    t1 = v_in[7] + big_sigma1(v_in[4]) + f_ch(v_in[4], v_in[5], v_in[6]) + k + w;
    t2 = big_sigma0(v_in[0]) + f_maj(v_in[0], v_in[1], v_in[2]);
    sha2_next[0] = t1 + t2;
    sha2_next[1] = v_in[0];
    sha2_next[2] = v_in[1];
    sha2_next[3] = v_in[2];
    sha2_next[4] = v_in[3] + t1;
    sha2_next[5] = v_in[4];
    sha2_next[6] = v_in[5];
    sha2_next[7] = v_in[6];

    unique case (sel)
      SEL_ADD: arith = acc_in + mem_data;
      SEL_SUB: arith = acc_in - mem_data;
      SEL_AND: arith = acc_in & mem_data;
      SEL_OR:  arith = acc_in | mem_data;
      default: arith = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      alu_sign <= 1'b0;
      alu_out  <= '0;
      for (int i = 0; i < 8; i++) v_out[i] <= '0;
    end else if (alu_e) begin
      unique case (sel)
        SEL_SHA1: for (int i = 0; i < 8; i++) v_out[i] <= sha1_next[i];
        SEL_SHA2: for (int i = 0; i < 8; i++) v_out[i] <= sha2_next[i];
        default: begin
          alu_out  <= arith;
          alu_sign <= (arith != '0) && !arith[WORD_W-1];
        end
      endcase
    end
  end

endmodule
