// tb_nco: self-checking test of the NCO.
//
// Drives phase steps (mostly -4, 0, +4 as the loop does, sometimes large
// jumps) and checks on every clock that phase_out is the running sum of the
// steps and that cosine/sine equal AMP*cos/sin(2*pi*(n*FREQ_WORD +
// phase_out(n - ITER - 1))/2^16), n clocks after reset: the carrier is
// free-running at the fixed frequency with zero phase, and a step reaches the
// samples ITER + 2 clocks after it is applied.
module tb_nco;
  import psk_pkg::*;
  localparam int ITER = 14;
  localparam int FW   = 2048;
  localparam int AMP  = 16000;
  localparam int N    = 4000;
  localparam real PI  = 3.14159265358979323846;
  localparam int TOL  = 10;

  logic clk = 0, rst_n = 0;
  sample_t phase_in, sine, cosine;
  phase_t  phase_out;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  nco #(.ITER(ITER), .FREQ_WORD(16'(FW)), .AMP(AMP)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned est_hist[N+1];   // est_hist[n]: phase_out after n clocks

  initial begin
    automatic int unsigned est = 0;
    phase_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    est_hist[0] = 0;
    checks++;
    if (phase_out !== 0) failures++;
    for (int n = 1; n <= N; n++) begin
      automatic int r = int'($urandom_range(99));
      if (r < 30)      phase_in = 16'sd4;
      else if (r < 60) phase_in = -16'sd4;
      else if (r < 97) phase_in = 16'sd0;
      else             phase_in = sample_t'($urandom);
      est = (est + int'(phase_in)) & 32'hFFFF;
      @(posedge clk); #1;
      est_hist[n] = est;
      checks++;
      if (phase_out !== phase_t'(est)) begin
        failures++;
        if (failures < 10) $display("phase_out n=%0d got %0d expected %0d", n, phase_out, est);
      end
      if (n > ITER) begin
        automatic real a  = 2.0 * PI * real'((n * FW + est_hist[n-ITER-1]) % 65536) / 65536.0;
        automatic real ec = real'(AMP) * $cos(a);
        automatic real es = real'(AMP) * $sin(a);
        checks++;
        if (fabs(real'(cosine) - ec) > TOL || fabs(real'(sine) - es) > TOL) begin
          failures++;
          if (failures < 10)
            $display("sample n=%0d got (%0d,%0d) expected (%f,%f)", n, cosine, sine, ec, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
