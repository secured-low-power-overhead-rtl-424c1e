// aes128_enc: iterative AES-128 encryption core whose S-Boxes are LUT based,
// with an AND/OR multiplexing circuit and a complementary compensator.
//
// Operation: when start is seen while the core is idle, the plaintext XORed
// with the key (the initial AddRoundKey) is loaded into the state register
// through the 2-to-1 state multiplexer, and the key into the round-key
// register. In each of the next 10 clocks one round is computed
// combinationally: the key expansion derives round key r from round key r-1,
// and aes_round applies SubBytes, ShiftRow, MixColumn and AddRoundKey; the
// multiplexer now feeds the round result back into the state register.
// Round 10 skips MixColumn, its result is stored in the ciphertext register
// and done pulses for one clock.
//
// Timing: start sampled at clock edge 0, done high after edge 10 (10 cycles
// of busy, one per round), ciphertext valid with done and held until the
// next encryption completes. A start while busy is ignored. A new start may
// be given in the cycle done is high. Reset is asynchronous, active low.
//
// sbox_dummy and key_dummy carry the compensator outputs of the 16 state
// S-Boxes and the 4 key-schedule S-Boxes; they are the complement of the
// S-Box outputs of the round in progress and serve only to balance power.
//
// The round flow (initial key addition, 2-to-1 multiplexer, N-1 full rounds,
// final round without MixColumn, key expansion beside the datapath) and the
// S-Box architecture follow the design this core implements. One round per
// clock, the on-the-fly key schedule, the start/busy/done handshake and the
// use of protected S-Boxes in the key schedule are this design's choices.
module aes128_enc
  import aes_pkg::*;
#(
  parameter sbox_arch_e ARCH       = SBOX_ANDOR,
  parameter bit         COMPENSATE = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] plaintext,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [127:0] ciphertext,
  output logic [127:0] sbox_dummy,
  output logic [31:0]  key_dummy
);

  logic [127:0] state_q, rkey_q;
  byte_t        rcon_q;
  logic [3:0]   round_q;       // round being computed, 1..NR

  logic [127:0] next_key, round_out, state_d;
  logic         load, final_round;

  assign load        = start && !busy;
  assign final_round = (round_q == 4'(NR));

  aes_key_expand #(.ARCH(ARCH), .COMPENSATE(COMPENSATE)) u_kexp (
    .key_i  (rkey_q),
    .rcon   (rcon_q),
    .key_o  (next_key),
    .dummy_o(key_dummy)
  );

  aes_round #(.ARCH(ARCH), .COMPENSATE(COMPENSATE)) u_round (
    .state_i    (state_q),
    .round_key  (next_key),
    .final_round(final_round),
    .state_o    (round_out),
    .dummy_o    (sbox_dummy)
  );

  // 2-to-1 state multiplexer: plaintext ^ key on load, round result otherwise
  assign state_d = load ? (plaintext ^ key) : round_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= '0;
      rkey_q     <= '0;
      rcon_q     <= 8'h01;
      round_q    <= 4'd1;
      busy       <= 1'b0;
      done       <= 1'b0;
      ciphertext <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        state_q <= state_d;
        rkey_q  <= key;
        rcon_q  <= 8'h01;
        round_q <= 4'd1;
        busy    <= 1'b1;
      end else if (busy) begin
        state_q <= state_d;
        rkey_q  <= next_key;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (final_round) begin
          ciphertext <= round_out;
          busy       <= 1'b0;
          done       <= 1'b1;
        end
      end
    end
  end

endmodule
