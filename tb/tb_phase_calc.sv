// tb_phase_calc: self-checking test of the phase calculation block.
//
// Random error samples c (with repeats, so equal neighbours occur) and random
// signs in {-1, 0, +1}. Each step is compared, exactly MULT_LAT + 1 clocks
// after c(k) enters, with 4 * [c(k-1) > c(k)] * sgn(k), c(-1) = 0.
// Up, down and hold outcomes must all occur.
module tb_phase_calc;
  import psk_pkg::*;
  localparam int L = 3;
  localparam int N = 3000;

  logic clk = 0, rst_n = 0;
  logic signed [SAMPLE_W:0] c;
  sgn_t sgn;
  sample_t step;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_hold = 0;

  phase_calc #(.SCALE_SHIFT(2), .MULT_LAT(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cs[N], ss[N], expv[N];

  initial begin
    for (int k = 0; k < N; k++) begin
      cs[k] = ($urandom_range(9) == 0 && k > 0) ? cs[k-1] : int'($urandom_range(131071)) - 65536;
      ss[k] = int'($urandom_range(2)) - 1;
      expv[k] = ((k > 0 ? cs[k-1] : 0) > cs[k]) ? 4 * ss[k] : 0;
    end
    c = 0; sgn = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int j = 0; j < N + L - 1; j++) begin
      if (j < N) begin c = 17'(cs[j]); sgn = sgn_t'(ss[j]); end
      @(posedge clk); #1;
      if (j >= L - 1) begin
        automatic int k = j - (L - 1);
        checks++;
        if (int'(step) != expv[k]) begin
          failures++;
          if (failures < 10) $display("k=%0d got %0d expected %0d", k, step, expv[k]);
        end
        if (expv[k] > 0) n_up++; else if (expv[k] < 0) n_down++; else n_hold++;
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
