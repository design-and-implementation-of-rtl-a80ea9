// tb_decision_threshold: self-checking test of the zero-threshold decision.
//
// Boundary values and random inputs; the bit must be 1 exactly when the
// input is zero or positive.
module tb_decision_threshold;
  import psk_pkg::*;
  sample_t din;
  logic bit_o;
  int checks = 0, failures = 0;

  decision_threshold dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int v);
    din = sample_t'(v);
    #1;
    checks++;
    if (bit_o !== (int'(din) >= 0)) begin
      failures++;
      if (failures < 10) $display("din=%0d bit=%0b", din, bit_o);
    end
  endtask

  initial begin
    check(0); check(-1); check(1); check(4); check(-4);
    check(32767); check(-32768);
    for (int k = 0; k < 1000; k++) check(int'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
