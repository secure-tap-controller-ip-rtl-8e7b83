// lblock: iterative LBlock block-cipher encryption core (64-bit block, 80-bit key).
//
// LBlock is a 32-round Feistel network. The 64-bit plaintext is split into a
// left half X1 and a right half X0; each round computes
//   X(i) = P(S(X(i-1) ^ K(i-1))) ^ (X(i-2) <<< 8)
// where S applies the eight 4x4 S-boxes s0..s7 to the eight nibbles and P
// permutes the nibbles. The ciphertext is X32 || X33. The round key is the left
// 32 bits of the 80-bit key register; after each round that register is rotated
// left by 29, its top two nibbles pass through s9 and s8, and bits 50..46 are
// XORed with the round number.
//
// This core computes one round per clock, so a block takes LB_ROUNDS (32)
// cycles: 64 bits per 32 cycles, i.e. 200 kbit/s at a 100 kHz clock.
// Interface: pulse start for one cycle with plaintext/key valid; busy is high
// for the 32 cycles of the computation; done pulses on the cycle after the
// last round, and ciphertext holds the result until the next start.
// The round structure and round count follow the LBlock description; the
// S-box contents and the nibble permutation are those of the published cipher.
module lblock
  import stap_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [LB_BLOCK-1:0] plaintext,
  input  logic [LB_KEY-1:0]   key,
  output logic                busy,
  output logic                done,
  output logic [LB_BLOCK-1:0] ciphertext
);

  logic [31:0]       left_q, right_q;
  logic [LB_KEY-1:0] key_q;
  logic [5:0]        round_q;   // number of the round being computed, 1..32

  function automatic logic [31:0] round_f(input logic [31:0] x, input logic [31:0] k);
    logic [31:0] z;
    logic [31:0] y;
    y = x ^ k;
    for (int n = 0; n < 8; n++) z[4*n +: 4] = lb_sbox(n, y[4*n +: 4]);
    // nibble permutation P: u7=z6 u6=z4 u5=z7 u4=z5 u3=z2 u2=z0 u1=z3 u0=z1
    return {z[27:24], z[19:16], z[31:28], z[23:20], z[11:8], z[3:0], z[15:12], z[7:4]};
  endfunction

  function automatic logic [LB_KEY-1:0] key_update(input logic [LB_KEY-1:0] k,
                                                   input logic [4:0] rnd);
    logic [LB_KEY-1:0] r;
    r = {k[LB_KEY-30:0], k[LB_KEY-1:LB_KEY-29]};
    r[79:76] = lb_sbox(9, r[79:76]);
    r[75:72] = lb_sbox(8, r[75:72]);
    r[50:46] = r[50:46] ^ rnd;
    return r;
  endfunction

  logic [31:0] f_out;
  assign f_out = round_f(left_q, key_q[79:48]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_q  <= '0;
      right_q <= '0;
      key_q   <= '0;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        left_q  <= plaintext[63:32];
        right_q <= plaintext[31:0];
        key_q   <= key;
        round_q <= 6'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        left_q  <= f_out ^ {right_q[23:0], right_q[31:24]};
        right_q <= left_q;
        key_q   <= key_update(key_q, round_q[4:0]);
        round_q <= round_q + 6'd1;
        if (round_q == 6'(LB_ROUNDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // After round 32, left holds X33 and right holds X32.
  assign ciphertext = {right_q, left_q};

endmodule
