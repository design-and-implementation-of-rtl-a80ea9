// tb_sign_detector: self-checking test of the sign detector.
//
// Random sample quadruples, plus zero and full-scale corner cases, one per
// clock. Each output is compared, exactly MULT_LAT (3) clocks after its
// inputs, with sign(xq*yi - xi*yq) computed in 64-bit integers. Counts of
// +1, -1 and 0 results are required to be non-zero.
module tb_sign_detector;
  import psk_pkg::*;
  localparam int L = 3;
  localparam int N = 3000;

  logic clk = 0, rst_n = 0;
  sample_t xi, xq, yi, yq;
  sgn_t sgn;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_zero = 0;

  sign_detector #(.MULT_LAT(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sgn_t expv[N];

  initial begin
    xi = 0; xq = 0; yi = 0; yq = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int j = 0; j < N + L - 1; j++) begin
      if (j < N) begin
        automatic longint d;
        xi = sample_t'($urandom); xq = sample_t'($urandom);
        yi = sample_t'($urandom); yq = sample_t'($urandom);
        case (j % 50)
          1: begin xi = 0; xq = 0; end                         // zero product
          2: begin xq = xi; yi = yq; end                       // equal products
          3: begin xi = -16'sd32768; yq = -16'sd32768; xq = 16'sd32767; yi = -16'sd32768; end
          4: begin xi = 16'sd1; yq = 16'sd1; xq = 16'sd0; end  // tiny negative
          default: ;
        endcase
        d = longint'(xq) * longint'(yi) - longint'(xi) * longint'(yq);
        expv[j] = (d > 0) ? SGN_POS : (d < 0) ? SGN_NEG : SGN_ZERO;
      end
      @(posedge clk); #1;
      if (j >= L - 1) begin
        automatic int k = j - (L - 1);
        checks++;
        if (sgn !== expv[k]) begin
          failures++;
          if (failures < 10) $display("k=%0d got %0d expected %0d", k, sgn, expv[k]);
        end
        if (expv[k] == SGN_POS) n_pos++;
        else if (expv[k] == SGN_NEG) n_neg++;
        else n_zero++;
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
