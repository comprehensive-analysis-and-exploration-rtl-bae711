// tb_aes_encrypt: the encryption engine at its default point and at four
// other points of the design space.
//
// Runs enc_config_check on 3_0_10 (default), 0_0_1, 1_1_2, 2_0_5 and 0_1_5.
// Expected latencies and blocks in flight are those of the design-space
// tables. The iterative points must show recirculation and input stalls.
module tb_aes_encrypt;
  import aes_ref_pkg::*;

  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] done;
  int c [N], f [N], s [N], r [N];
  int checks, failures;

  always #5 clk = ~clk;

  enc_config_check #(.PR(3), .P(0), .HR(10), .LAT(32), .PAR(31)) u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .stalls(s[0]), .recircs(r[0]));
  enc_config_check #(.PR(0), .P(0), .HR(1),  .LAT(11), .PAR(1))  u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .stalls(s[1]), .recircs(r[1]));
  enc_config_check #(.PR(1), .P(1), .HR(2),  .LAT(21), .PAR(4))  u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .stalls(s[2]), .recircs(r[2]));
  enc_config_check #(.PR(2), .P(0), .HR(5),  .LAT(23), .PAR(11)) u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]), .stalls(s[3]), .recircs(r[3]));
  enc_config_check #(.PR(0), .P(1), .HR(5),  .LAT(11), .PAR(5))  u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]), .stalls(s[4]), .recircs(r[4]));

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
  endtask

  initial begin
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    report();
    // iterative points must recirculate and stall; the unrolled one must not
    for (int i = 1; i < N; i++) begin
      checks += 2;
      if (r[i] == 0) begin failures++; $display("FAIL config %0d never recirculated", i); end
      if (s[i] == 0) begin failures++; $display("FAIL config %0d never stalled", i); end
    end
    checks++;
    if (r[0] != 0 || s[0] != 0) begin failures++; $display("FAIL unrolled config recirculated or stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    report();
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
