// tb_aes_space_pr3: the seven design points with PR=3 internal round registers.
//
// Each point PR_P_HR runs in its own enc_config_check: the FIPS-197 block with
// its exact latency, a back-to-back stream whose largest number of blocks in
// flight must equal the parallel-work figure plus one, and a stream under a
// second key with random gaps. Latency (LAT) and parallel work (PAR) are the
// values listed for each point in the design-space results. Points with
// HR < 10 must recirculate blocks and stall the input; HR=10 points must not.
module tb_aes_space_pr3;
  import aes_ref_pkg::*;

  localparam int N = 7;
  localparam int HRS [N] = '{1, 2, 5, 10, 2, 5, 10};
  logic clk = 0, rst_n = 0;
  logic [N-1:0] done;
  int c [N], f [N], s [N], r [N];
  int checks, failures;

  always #5 clk = ~clk;

  enc_config_check #(.PR(3), .P(0), .HR(1), .LAT(41), .PAR(4), .NBLK(48)) u0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .stalls(s[0]), .recircs(r[0]));
  enc_config_check #(.PR(3), .P(0), .HR(2), .LAT(36), .PAR(7), .NBLK(48)) u1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .stalls(s[1]), .recircs(r[1]));
  enc_config_check #(.PR(3), .P(0), .HR(5), .LAT(33), .PAR(16), .NBLK(48)) u2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .stalls(s[2]), .recircs(r[2]));
  enc_config_check #(.PR(3), .P(0), .HR(10), .LAT(32), .PAR(31), .NBLK(48)) u3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]), .stalls(s[3]), .recircs(r[3]));
  enc_config_check #(.PR(3), .P(1), .HR(2), .LAT(41), .PAR(8), .NBLK(48)) u4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]), .stalls(s[4]), .recircs(r[4]));
  enc_config_check #(.PR(3), .P(1), .HR(5), .LAT(41), .PAR(20), .NBLK(48)) u5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]), .stalls(s[5]), .recircs(r[5]));
  enc_config_check #(.PR(3), .P(1), .HR(10), .LAT(41), .PAR(40), .NBLK(48)) u6 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]), .stalls(s[6]), .recircs(r[6]));

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
    for (int i = 0; i < N; i++) begin
      checks++;
      if (HRS[i] < 10 && (r[i] == 0 || s[i] == 0)) begin
        failures++;
        $display("FAIL point %0d: %0d recirculations, %0d stalls", i, r[i], s[i]);
      end
      if (HRS[i] == 10 && (r[i] != 0 || s[i] != 0)) begin
        failures++;
        $display("FAIL point %0d: unrolled point recirculated or stalled", i);
      end
    end
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
