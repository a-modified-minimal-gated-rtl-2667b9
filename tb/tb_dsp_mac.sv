// tb_dsp_mac: checks the three modes of the MAC slice and its 3-cycle
// latency. Random operations are issued (some cycles idle); a reference
// accumulator computed here predicts p three cycles after each issue, and
// p must hold its value when nothing is issued.
module tb_dsp_mac;
  import mgu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0; mac_cmd_t cmd = MAC_AB; data_t a = 0, b = 0; acc_t c = 0; acc_t p;
  dsp_mac dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  longint ref_p = 0;
  longint expq[$];   // expected p per cycle, 3 cycles ahead
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) expq.push_back(0);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check the value due now
      checks++;
      if (p !== acc_t'(expq[0])) begin
        failures++; if (failures < 10) $display("FAIL cycle %0d: p=%0d exp=%0d", i, p, expq[0]);
      end
      void'(expq.pop_front());
      en  = ($urandom_range(3) != 0);
      cmd = mac_cmd_t'($urandom_range(2));
      a   = data_t'($urandom); b = data_t'($urandom);
      c   = acc_t'($signed($urandom)) <<< 4;
      if (en) begin
        unique case (cmd)
          MAC_ABC: ref_p = longint'(a) * longint'(b) + longint'(c);
          MAC_AB:  ref_p = longint'(a) * longint'(b);
          default: ref_p = longint'(a) * longint'(b) + ref_p;
        endcase
      end
      expq.push_back(ref_p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
