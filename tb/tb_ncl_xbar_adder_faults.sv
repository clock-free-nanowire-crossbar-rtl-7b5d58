// tb_ncl_xbar_adder_faults: behaviour of the adder pipeline under stuck-at
// faults on a routing nanowire.
//
// NCL makes two kinds of fault visible without timing analysis: a rail that
// is stuck at 1 can never return to NULL, so the four-phase handshake halts,
// and a rail that is stuck at 1 while the opposite rail is asserted shows
// the illegal code 11. A rail stuck at 0 is found only by a pattern that
// needs it: the DATA wavefront then never completes.
// The test runs words through the pipeline one at a time (present DATA,
// wait for a complete result, request NULL, withdraw the inputs, wait for
// NULL) with a time limit on every wait. It does this three times after a
// reset: fault-free (every word must complete with the right sum), with the
// output of the carry-0 gate (TH23, row 1 column 1) forced to 1 (the
// pipeline must halt or show an illegal code within a few words, and never
// deliver a wrong valid result), and with the output of the carry-1 gate
// forced to 0 (words whose carry is 0 still complete correctly; the first
// word whose carry is 1 must halt).
module tb_ncl_xbar_adder_faults;
  import ncl_pkg::*;
  localparam int LIMIT = 200;   // ns allowed for one handshake phase

  logic        rst, ko, ki;
  dr_t         a, b, ci, co;
  dr_t [0:0]   s;
  int          checks = 0, failures = 0;
  bit          illegal;

  ncl_xbar_adder dut (.rst(rst), .a(a), .b(b), .ci(ci), .ko(ko), .s(s), .co(co), .ki(ki));

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(s[0] or co) if (!rst && ((s[0].r0 && s[0].r1) || (co.r0 && co.r1))) illegal = 1'b1;

  task automatic wait_until_data(output bit ok);
    ok = 1'b0;
    for (int t = 0; t < LIMIT; t++) begin
      if (is_data(s[0]) && is_data(co)) begin ok = 1'b1; break; end
      #1;
    end
  endtask

  task automatic wait_until_null(output bit ok);
    ok = 1'b0;
    for (int t = 0; t < LIMIT; t++) begin
      if (is_null(s[0]) && is_null(co) && ko) begin ok = 1'b1; break; end
      #1;
    end
  endtask

  // One word through the pipeline. done = 0 when a phase timed out.
  task automatic one_word(bit [2:0] v, output bit done, output bit correct);
    bit ok;
    bit [1:0] sum;
    sum     = v[0] + v[1] + v[2];
    done    = 1'b0;
    correct = 1'b0;
    a = to_dr(v[0]); b = to_dr(v[1]); ci = to_dr(v[2]);
    wait_until_data(ok);
    if (!ok) return;
    correct = (s[0] == to_dr(sum[0])) && (co == to_dr(sum[1]));
    #2 ki = 1'b0;
    a = DR_NULL; b = DR_NULL; ci = DR_NULL;
    #2 ki = 1'b0;
    wait_until_null(ok);
    ki = 1'b1;
    #5;
    done = ok;
  endtask

  task automatic restart();
    rst = 1'b1; ki = 1'b1; a = DR_NULL; b = DR_NULL; ci = DR_NULL; illegal = 1'b0;
    #10 rst = 1'b0;
    #10;
  endtask

  initial begin
    bit done, correct, halted;
    bit [2:0] v;
    int n;

    // Fault-free: all words complete and are correct.
    restart();
    for (int k = 0; k < 64; k++) begin
      one_word(3'(k), done, correct);
      checks++;
      if (!done || !correct || illegal) begin
        failures++;
        $display("FAIL fault-free word %0d: done=%0d correct=%0d illegal=%0d", k, done, correct, illegal);
      end
    end

    // Carry-0 track stuck at 1.
    restart();
    force dut.u_adder.g_fa[0].u_fa.u_fabric.g_gate[0].u_pgmb.z = 1'b1;
    halted = 1'b0;
    n = 0;
    for (int k = 0; k < 16 && !halted && !illegal; k++) begin
      v = 3'($urandom);
      one_word(v, done, correct);
      if (!done) halted = 1'b1;
      else if (correct) n++;
      else if (!illegal) begin
        failures++;
        $display("FAIL stuck-at-1 gave a wrong valid result for %b", v);
      end
    end
    checks++;
    if (!halted && !illegal) begin
      failures++;
      $display("FAIL stuck-at-1 neither halted the pipeline nor showed code 11");
    end
    $display("stuck-at-1: halted=%0d illegal code seen=%0d after %0d good words", halted, illegal, n);
    release dut.u_adder.g_fa[0].u_fa.u_fabric.g_gate[0].u_pgmb.z;

    // Carry-1 gate output stuck at 0: words with carry 0 pass, carry 1 halts.
    restart();
    force dut.u_adder.g_fa[0].u_fa.u_fabric.g_gate[1].u_pgmb.z = 1'b0;
    for (int k = 0; k < 8; k++) begin
      v = 3'(k);
      if ((v[0] + v[1] + v[2]) >= 2) continue;
      one_word(v, done, correct);
      checks++;
      if (!done || !correct) begin
        failures++;
        $display("FAIL stuck-at-0: carry-0 word %b did not pass", v);
      end
    end
    one_word(3'b011, done, correct);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL stuck-at-0: carry-1 word completed");
    end else $display("stuck-at-0: carry-0 words passed, first carry-1 word halted");
    release dut.u_adder.g_fa[0].u_fa.u_fabric.g_gate[1].u_pgmb.z;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
