// tb_cordic_rotator: self-checking test of the pipelined CORDIC rotator.
//
// Feeds one random vector and angle per clock and compares each output pair,
// exactly ITER + 1 clocks later, with K * R(z) * (x, y) computed in real
// arithmetic (K = CORDIC gain). A few fixed angles (0, quadrant edges) are
// included. Tolerance is a few LSB of the 16-bit output.
module tb_cordic_rotator;
  localparam int ITER = 14;
  localparam int N    = 3000;
  localparam real PI  = 3.14159265358979323846;
  localparam real K   = 1.646760258121066;
  localparam int TOL  = 8;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] x_in, y_in, x_out, y_out;
  logic        [15:0] z_in;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  cordic_rotator #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xs[N], ys[N], zs[N];

  initial begin
    for (int k = 0; k < N; k++) begin
      xs[k] = int'($urandom_range(26000)) - 13000;
      ys[k] = int'($urandom_range(26000)) - 13000;
      zs[k] = int'($urandom_range(65535));
    end
    // fixed corner cases: quadrant boundaries and a pure cosine start vector
    zs[0] = 0;     zs[1] = 16384; zs[2] = 32768; zs[3] = 49152;
    zs[4] = 16383; zs[5] = 49151; zs[6] = 65535;
    for (int k = 0; k < 7; k++) begin xs[k] = 9716; ys[k] = 0; end
    x_in = 0; y_in = 0; z_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int j = 0; j < N + ITER; j++) begin
      if (j < N) begin
        x_in = 16'(xs[j]); y_in = 16'(ys[j]); z_in = 16'(zs[j]);
      end
      @(posedge clk); #1;
      if (j >= ITER) begin
        automatic int  k  = j - ITER;
        automatic real a  = 2.0 * PI * real'(zs[k]) / 65536.0;
        automatic real ex = K * (real'(xs[k]) * $cos(a) - real'(ys[k]) * $sin(a));
        automatic real ey = K * (real'(xs[k]) * $sin(a) + real'(ys[k]) * $cos(a));
        checks++;
        if (fabs(real'(x_out) - ex) > TOL || fabs(real'(y_out) - ey) > TOL) begin
          failures++;
          if (failures < 10)
            $display("mismatch k=%0d z=%0d: got (%0d,%0d) expected (%f,%f)",
                     k, zs[k], x_out, y_out, ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
