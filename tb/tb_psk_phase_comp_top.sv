// tb_psk_phase_comp_top: end-to-end test of the phase compensation loop at
// its default parameters.
//
// Generates MPSK-modulated quadrature carriers, xi = A cos(2*pi*n*FW/2^16 +
// theta) + noise and xq = A sin(...) + noise, with A equal to the NCO
// amplitude and Gaussian noise (sum of 12 uniforms) at the given SNR
// (SNR = A^2 / (2 sigma^2) per complex sample). Four cases are run, each from
// reset: BPSK with a 45 degree carrier offset at 10 dB, and QPSK, 8-PSK and
// 16-PSK with a 22.5 degree offset at 10, 10 and 15 dB. In each case a short
// sequence of symbols is sent, each held long enough for the loop to settle,
// and theta = 2*pi*k/M + offset for symbol k. At the end of every symbol the
// mean circular error of the estimated phase over the last 2048 samples must
// be under 1 degree. The number of samples the loop took to come within
// 1 degree of the new phase is printed.
//
// Every clock it also checks the loop's bookkeeping: the phase step is one of
// -4, 0, +4; the estimated phase advances by exactly the previous step; the
// decision bit is 1 exactly when the step is not negative. It counts the
// loop's mechanisms (phase raised, phase lowered, step held by the
// comparator, estimated phase wrapping through zero, both decision values,
// settled symbols) and fails any that never occurs.
module tb_psk_phase_comp_top;
  import psk_pkg::*;
  localparam int  FW      = 2048;     // default FREQ_WORD of the design
  localparam int  A       = 16000;    // default AMP of the design
  localparam int  HOLD    = 40000;    // samples per symbol
  localparam int  WIN     = 2048;     // averaging window at the end of a symbol
  localparam real PI      = 3.14159265358979323846;
  localparam real TOL_DEG = 1.0;

  logic clk = 0, rst_n = 0;
  sample_t xi, xq, yi, yq, phase_step;
  phase_t  phase_est;
  sgn_t    phase_sign;
  logic    bit_o;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_up = 0, n_down = 0, n_hold = 0, n_wrap = 0, n_bit0 = 0, n_bit1 = 0, n_settled = 0;

  psk_phase_comp_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (14 * HOLD + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  function automatic sample_t clip(input real v);
    if (v > 32767.0)  return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return sample_t'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

  // circular difference a - b of two phase codes, in degrees (-180..180)
  function automatic real cdiff_deg(input int a, input int b);
    int d = (a - b) & 32'hFFFF;
    if (d >= 32768) d -= 65536;
    return real'(d) * 360.0 / 65536.0;
  endfunction

  // Per-clock bookkeeping checks and mechanism counts, active after reset.
  phase_t  est_q;
  sample_t step_q;
  logic    run = 0;
  always @(posedge clk) begin
    if (run) begin
      checks++;
      if (phase_est !== phase_t'(est_q + phase_t'(step_q))) begin
        failures++;
        if (failures < 10) $display("est %0d != %0d + %0d", phase_est, est_q, step_q);
      end
      if (est_q >= 16'hC000 && phase_est < 16'h4000 || est_q < 16'h4000 && phase_est >= 16'hC000)
        n_wrap++;
    end
    est_q  <= phase_est;
    step_q <= phase_step;
  end

  always @(negedge clk) begin
    if (run) begin
      checks++;
      if (!(phase_step inside {-16'sd4, 16'sd0, 16'sd4}) || bit_o !== (phase_step >= 0)) begin
        failures++;
        if (failures < 10) $display("bad step/bit: step=%0d bit=%0b", phase_step, bit_o);
      end
      if (phase_step > 0) n_up++;
      else if (phase_step < 0) n_down++;
      else if (phase_sign != 0) n_hold++;
      if (bit_o) n_bit1++; else n_bit0++;
    end
  end

  task automatic run_case(input string name, input int M, input real offs_deg,
                          input real snr_db, input int syms[3]);
    real sigma = real'(A) / $sqrt(2.0 * (10.0 ** (snr_db / 10.0)));
    $display("case %s: M=%0d offset=%0.1f deg SNR=%0.1f dB", name, M, offs_deg, snr_db);
    run = 0;
    rst_n = 0; xi = 0; xq = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run = 1;
    for (int s = 0; s < 3; s++) begin
      real theta_deg = 360.0 * real'(syms[s]) / real'(M) + offs_deg;
      int  target = $rtoi(theta_deg / 360.0 * 65536.0 + 0.5) & 32'hFFFF;
      real acc = 0.0;
      int  acq = -1;   // first sample with |error| < 1 degree
      for (int t = 0; t < HOLD; t++) begin
        int  n = s * HOLD + t;   // clocks since reset
        real a = 2.0 * PI * (real'((n * FW) & 32'hFFFF) / 65536.0 + theta_deg / 360.0);
        xi = clip(real'(A) * $cos(a) + sigma * gauss());
        xq = clip(real'(A) * $sin(a) + sigma * gauss());
        @(posedge clk); #1;
        if (acq < 0 && cdiff_deg(int'(phase_est), target) < 1.0 &&
            cdiff_deg(int'(phase_est), target) > -1.0) acq = t;
        if (t >= HOLD - WIN) acc += cdiff_deg(int'(phase_est), target);
      end
      acc = acc / real'(WIN);
      checks++;
      if (acc > TOL_DEG || acc < -TOL_DEG) begin
        failures++;
        $display("  symbol %0d: target %0.2f deg, mean error %0.3f deg, within 1 deg after %0d samples  FAIL",
                 syms[s], theta_deg, acc, acq);
      end else begin
        n_settled++;
        $display("  symbol %0d: target %0.2f deg, mean error %0.3f deg, within 1 deg after %0d samples",
                 syms[s], theta_deg, acc, acq);
      end
    end
    run = 0;
  endtask

  initial begin
    xi = 0; xq = 0;
    run_case("BPSK",   2,  45.0, 10.0, '{0, 1, 0});
    run_case("QPSK",   4,  22.5, 10.0, '{0, 3, 1});
    run_case("8-PSK",  8,  22.5, 10.0, '{0, 7, 2});
    run_case("16-PSK", 16, 22.5, 15.0, '{0, 15, 5});
    $display("mechanisms: up=%0d down=%0d held=%0d wrap=%0d bit0=%0d bit1=%0d settled=%0d",
             n_up, n_down, n_hold, n_wrap, n_bit0, n_bit1, n_settled);
    checks++;
    if (n_up == 0 || n_down == 0 || n_hold == 0 || n_wrap == 0 ||
        n_bit0 == 0 || n_bit1 == 0 || n_settled != 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
