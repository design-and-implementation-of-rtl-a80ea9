// tb_phase_detector: self-checking test of the error subtractor.
//
// Random and full-scale operand pairs; err must equal xi - yi exactly,
// including the extremes that need the extra output bit.
module tb_phase_detector;
  import psk_pkg::*;
  sample_t xi, yi;
  logic signed [SAMPLE_W:0] err;
  int checks = 0, failures = 0;

  phase_detector dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a, input int b);
    xi = sample_t'(a); yi = sample_t'(b);
    #1;
    checks++;
    if (int'(err) != int'(xi) - int'(yi)) begin
      failures++;
      if (failures < 10) $display("%0d - %0d gave %0d", xi, yi, err);
    end
  endtask

  initial begin
    check(32767, -32768);
    check(-32768, 32767);
    check(0, 0);
    check(-1, 1);
    for (int k = 0; k < 2000; k++) check(int'($urandom), int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
