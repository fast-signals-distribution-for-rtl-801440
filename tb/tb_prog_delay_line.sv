// tb_prog_delay_line: fine-delay models as used in the PDG (12-bit code,
// 50 ps steps) and in the Fan-out (3-bit code, 2.5 ns steps). Random edge
// trains (clock-like and pulse-like) are sent through each with random codes;
// every output edge must follow its input edge by exactly code x step, with
// all bits of the bundle delayed alike.
`timescale 1ns/1ps
module tb_prog_delay_line;
  logic [11:0] code_a = 0;
  logic [2:0]  code_b = 0;
  logic [2:0]  d = 0, qa, qb;
  int checks = 0, failures = 0;

  prog_delay_line #(.WIDTH(3), .CW(12), .STEP_PS(50))   u_a (.code(code_a), .d, .q(qa));
  prog_delay_line #(.WIDTH(3), .CW(3),  .STEP_PS(2500)) u_b (.code(code_b), .d, .q(qb));

  realtime t_in [$];
  logic [2:0] v_in [$];
  int ia = 0, ib = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  always @(d) if ($realtime > 0) begin t_in.push_back($realtime); v_in.push_back(d); end

  always @(qa) if ($realtime > 0) begin
    realtime exp_t;
    exp_t = t_in[ia] + code_a * 0.050;
    check($realtime - exp_t < 0.0005 && exp_t - $realtime < 0.0005 && qa == v_in[ia],
          $sformatf("PDG line code %0d: edge at %0.3f, expected %0.3f", code_a, $realtime, exp_t));
    ia++;
  end
  always @(qb) if ($realtime > 0) begin
    realtime exp_t;
    exp_t = t_in[ib] + code_b * 2.5;
    check($realtime - exp_t < 0.0005 && exp_t - $realtime < 0.0005 && qb == v_in[ib],
          $sformatf("Fan-out line code %0d: edge at %0.3f, expected %0.3f", code_b, $realtime, exp_t));
    ib++;
  end

  initial begin
    for (int r = 0; r < 12; r++) begin
      // change codes only while the lines are empty
      #300;
      check(ia == t_in.size() && ib == t_in.size(),
            $sformatf("round %0d: %0d edges in, %0d and %0d out", r, t_in.size(), ia, ib));
      ia = t_in.size(); ib = t_in.size();
      code_a = (r == 0) ? 12'd0 : (r == 1) ? 12'd4095 : 12'($urandom_range(0, 4095));
      code_b = (r == 0) ? 3'd0 : (r == 1) ? 3'd7 : 3'($urandom_range(0, 7));
      for (int k = 0; k < 40; k++) begin
        // clock toggles; pulses change together with its rising edge
        #12.5 d = {~d[2], (k % 2 == 1) ? 2'($urandom) : d[1:0]};
      end
    end
    #300;
    check(ia == t_in.size() && ib == t_in.size(), "every input edge came out of both lines");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
