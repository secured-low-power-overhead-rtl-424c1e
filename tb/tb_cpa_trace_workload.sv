// tb_cpa_trace_workload: the encryption workload of a correlation power
// analysis campaign, run on the core at its default parameters.
//
// A side-channel evaluation encrypts one random plaintext per power trace
// under a fixed key. This testbench does the same for NTRACES = 140,000
// plaintexts (the largest trace count of the evaluation) under
// the key 13 11 1D 7F E3 94 4A 17 F3 07 A7 8B 4D 2B 30 C5, back to back, and
// checks every ciphertext against the reference model and the 10-cycle
// latency. In every busy cycle it also checks the compensator balance: the
// 16 state S-Box outputs together with their 16 dummy outputs always hold
// exactly 128 ones, and the key-schedule S-Boxes 32 ones, whatever the data.
// It reports the Hamming distance between the last-round input and the
// ciphertext (the usual last-round power model), summed over all traces.
module tb_cpa_trace_workload;
  import aes_ref_pkg::*;

  localparam int NTRACES = 140000;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] pt = '0, key = 128'h13111d7f_e3944a17_f307a78b_4d2b30c5, ct, sbox_dummy;
  logic [31:0]  key_dummy;
  logic         busy, done;

  u8 sb [256];
  int checks = 0, failures = 0, balance_checks = 0;
  longint hd_sum = 0;

  aes128_enc dut (
    .clk(clk), .rst_n(rst_n), .start(start), .plaintext(pt), .key(key),
    .busy(busy), .done(done), .ciphertext(ct), .sbox_dummy(sbox_dummy), .key_dummy(key_dummy)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NTRACES * 12 + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] rk [11];
    logic [127:0] st, last_in;
    fill_table(sb);
    ref_keys(key, sb, rk);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < NTRACES; n++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      st = pt ^ rk[0];
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      for (int r = 1; r <= 10; r++) begin
        logic [127:0] sub;
        logic [31:0]  w3, ksub;
        sub  = ref_subbytes(st, sb);
        w3   = rk[r-1][31:0];
        ksub = {sb[w3[23:16]], sb[w3[15:8]], sb[w3[7:0]], sb[w3[31:24]]};
        checks++;
        if (!busy || sbox_dummy !== ~sub) begin
          failures++;
          $display("FAIL trace %0d round %0d dummy", n, r);
        end
        checks++;
        if ($countones(sbox_dummy) + $countones(sub) != 128 ||
            $countones(key_dummy) + $countones(ksub) != 32) begin
          failures++;
          $display("FAIL trace %0d round %0d balance", n, r);
        end
        balance_checks++;
        if (r == 10) last_in = st;
        st = ref_round(st, rk[r], r == 10, sb);
        @(posedge clk); #1;
      end
      checks++;
      if (!done || ct !== st) begin
        failures++;
        $display("FAIL trace %0d ct=%h exp=%h done=%0d", n, ct, st, done);
      end
      hd_sum += $countones(last_in ^ ct);
    end
    $display("traces=%0d balance_checks=%0d mean_last_round_HD=%0d/100",
             NTRACES, balance_checks, int'(hd_sum * 100 / NTRACES));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
