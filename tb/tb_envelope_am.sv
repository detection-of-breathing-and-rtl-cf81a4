// tb_envelope_am: the envelope filter at its built decimation of 500, fed
// the bench test signal used to tune the original filter: an amplitude-
// modulated sine. The carrier is 530 Hz (inside the breath-sound band), the
// modulation is 0.25 Hz with depth 0.8 and 1000 counts of carrier
// amplitude, sampled at 8 kHz for five modulation periods (160 000
// samples). The filter steps on every cycle (clk_enable held high, one clock
// per 8 kHz sample). Checks:
//   - exactly one ce_out per 500 samples (16 envelope values per second),
//   - in each of the last three modulation periods the envelope rises
//     clearly above and falls clearly below its long-run mean,
//   - the envelope maxima are one modulation period (64 envelope values)
//     apart, give or take 4,
//   - the envelope never goes negative.
// It does not compare against a bit-exact model; tb_envelope_filter does that.
module tb_envelope_am;
  localparam int    DECIM  = 500;
  localparam int    NMOD   = 5;
  localparam int    PERIOD = 32000;               // samples per modulation period
  localparam int    NS     = NMOD * PERIOD;
  localparam int    EPP    = PERIOD / DECIM;      // envelope values per period (64)
  localparam real   PI     = 3.14159265358979;

  logic clk = 0, rst = 1, ce = 0;
  logic signed [15:0] in1 = 0;
  logic signed [31:0] out1;
  logic ce_out;
  int checks = 0, failures = 0;
  int n_ce = 0;
  longint env [NS / DECIM + 2];

  envelope_filter dut (.clk, .rst, .clk_enable(ce), .in1, .ce_out, .out1);

  always #5 clk = ~clk;
  initial begin
    #(64'd10 * (NS + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    real a;
    longint mx, mn, sum;
    int arg [NMOD];
    repeat (3) @(posedge clk);
    @(negedge clk) begin rst = 0; ce = 1; end
    for (int i = 0; i < NS; i++) begin
      // peak carrier amplitude 1000 counts at the top of the modulation
      a = 1000.0 * (1.0 + 0.8 * $sin(2.0 * PI * i / PERIOD)) / 1.8
          * $sin(2.0 * PI * 530.0 * i / 8000.0);
      in1 = 16'($rtoi(a));
      @(posedge clk);
      if (ce_out) begin
        if (n_ce < $size(env)) env[n_ce] = longint'(out1);
        n_ce++;
        check(out1 >= 0, "envelope not negative");
      end
      @(negedge clk);
    end
    check(n_ce == NS / DECIM, $sformatf("%0d envelope strobes for %0d samples", n_ce, NS));
    sum = 0;
    for (int k = 2 * EPP; k < NMOD * EPP; k++) sum += env[k];
    sum /= (NMOD - 2) * EPP;
    for (int p = 2; p < NMOD; p++) begin
      mx = env[p * EPP]; mn = mx; arg[p] = p * EPP;
      for (int k = p * EPP; k < (p + 1) * EPP; k++) begin
        if (env[k] > mx) begin mx = env[k]; arg[p] = k; end
        if (env[k] < mn) mn = env[k];
      end
      $display("period %0d: envelope max %0d at %0d, min %0d, mean %0d", p, mx, arg[p], mn, sum);
      check(mx > sum + sum / 3, "envelope rises with the modulation");
      check(mn < sum - sum / 3, "envelope falls with the modulation");
      if (p > 2) check(arg[p] - arg[p-1] >= EPP - 4 && arg[p] - arg[p-1] <= EPP + 4,
                       $sformatf("maxima %0d apart", arg[p] - arg[p-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
