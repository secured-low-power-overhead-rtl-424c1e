// tb_aes128_enc_variants: the AES-128 core in its three other S-Box
// configurations, side by side with the default one:
//   multiplexer tree with compensator, AND/OR circuit without compensator,
//   multiplexer tree without compensator.
// All four cores get the same start, plaintext and key. Every ciphertext is
// compared with the reference model, with the 10-clock latency, and the
// dummy outputs must be ~SubBytes for compensated cores and 0 otherwise.
module tb_aes128_enc_variants;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int NCORE = 4;
  localparam sbox_arch_e ARCHS [NCORE] = '{SBOX_ANDOR, SBOX_MUX4, SBOX_ANDOR, SBOX_MUX4};
  localparam bit         COMPS [NCORE] = '{1'b1, 1'b1, 1'b0, 1'b0};

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] pt = '0, key = '0;
  logic [127:0] ct [NCORE];
  logic [127:0] sd [NCORE];
  logic [31:0]  kd [NCORE];
  logic         busy [NCORE];
  logic         done [NCORE];
  u8 sb [256];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NCORE; i++) begin : g_core
    aes128_enc #(.ARCH(ARCHS[i]), .COMPENSATE(COMPS[i])) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .plaintext(pt), .key(key),
      .busy(busy[i]), .done(done[i]), .ciphertext(ct[i]),
      .sbox_dummy(sd[i]), .key_dummy(kd[i])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] rk [11];
    logic [127:0] st;
    fill_table(sb);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < 200; n++) begin
      pt  = {$urandom, $urandom, $urandom, $urandom};
      key = {$urandom, $urandom, $urandom, $urandom};
      ref_keys(key, sb, rk);
      st = pt ^ rk[0];
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      for (int r = 1; r <= 10; r++) begin
        for (int i = 0; i < NCORE; i++) begin
          checks++;
          if (!busy[i] || done[i] || sd[i] !== (COMPS[i] ? ~ref_subbytes(st, sb) : 128'h0)) begin
            failures++;
            $display("FAIL core %0d block %0d round %0d dummy/busy", i, n, r);
          end
        end
        st = ref_round(st, rk[r], r == 10, sb);
        @(posedge clk); #1;
      end
      for (int i = 0; i < NCORE; i++) begin
        checks++;
        if (!done[i] || ct[i] !== st) begin
          failures++;
          $display("FAIL core %0d block %0d ct=%h exp=%h", i, n, ct[i], st);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
