// Self-checking test of the main angle decision: random sector votes with
// random invalid entries; reference counts votes and keeps the first
// largest count. Includes the all-invalid case and a non-zero vote threshold.
module tb_main_angle_decision;
  import scaler_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] sect  [16];
  logic       valid [16];
  logic [2:0] dom, dom2;
  logic [4:0] cnt, cnt2;
  logic       ok, ok2;

  main_angle_decision #(.VOTE_TH(0)) dut  (.sect(sect), .valid(valid), .dom(dom),  .dom_count(cnt),  .dom_ok(ok));
  main_angle_decision #(.VOTE_TH(5)) dut5 (.sect(sect), .valid(valid), .dom(dom2), .dom_count(cnt2), .dom_ok(ok2));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h[8];
    int best, bestc;
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 16; k++) begin
        sect[k]  = (n % 2 == 0) ? 3'($urandom_range(0, 7)) : 3'($urandom_range(2, 4));
        valid[k] = (n == 0) ? 1'b0 : ($urandom_range(0, 3) != 0);
      end
      #1;
      for (int k = 0; k < 8; k++) h[k] = 0;
      for (int k = 0; k < 16; k++) if (valid[k]) h[sect[k]]++;
      best = 0; bestc = h[0];
      for (int k = 1; k < 8; k++) if (h[k] > bestc) begin best = k; bestc = h[k]; end
      checks += 5;
      if (int'(cnt) != bestc) failures++;
      if (bestc > 0 && int'(dom) != best) failures++;
      if (ok != (bestc > 0)) failures++;
      if (ok2 != (bestc > 5)) failures++;
      if (dom2 != dom) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
