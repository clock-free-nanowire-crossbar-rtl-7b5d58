// tb_ncl_reg1: self-checking test of the 1-bit NCL register.
//
// Random values of d and Ki (d follows the four-phase protocol: it becomes
// DATA only while Ko requests data and NULL only while Ko requests null)
// are compared with a reference: each rail
// of q is a C-element of its d rail and Ki, and Ko is 1 exactly when q is
// NULL. The test also walks through the four-phase handshake explicitly:
// DATA passes on request for data, is held on request for null, and NULL
// passes only on request for null.
module tb_ncl_reg1;
  import ncl_pkg::*;

  logic rst, ki, ko;
  dr_t  d, q;
  dr_t  qref;
  int   checks = 0, failures = 0;

  ncl_reg1 dut (.rst(rst), .d(d), .ki(ki), .q(q), .ko(ko));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(dr_t eq, string what);
    checks++;
    if (q !== eq || ko !== (eq == DR_NULL)) begin
      failures++;
      $display("FAIL %s: d=%b ki=%b q=%b ko=%b expected q=%b", what, d, ki, q, ko, eq);
    end
  endtask

  initial begin
    rst = 1'b1; d = DR_NULL; ki = 1'b1;
    #5;
    expect_q(DR_NULL, "reset");
    rst = 1'b0;
    #5;
    // Explicit handshake.
    d = DR_DATA1; #5; expect_q(DR_DATA1, "DATA passes on rfd");
    d = DR_NULL;  #5; expect_q(DR_DATA1, "DATA held while Ki=rfd");
    ki = 1'b0;    #5; expect_q(DR_NULL,  "NULL passes on rfn");
    d = DR_DATA0; #5; expect_q(DR_NULL,  "DATA blocked on rfn");
    ki = 1'b1;    #5; expect_q(DR_DATA0, "DATA passes when rfd returns");
    ki = 1'b0;    #5; expect_q(DR_DATA0, "DATA held until NULL arrives");
    d = DR_NULL;  #5; expect_q(DR_NULL,  "NULL passes");
    // Random walk.
    qref = DR_NULL;
    for (int k = 0; k < 2000; k++) begin
      // The previous stage sends DATA only after this register has returned
      // to NULL, and NULL only after it has taken the DATA.
      if ($urandom % 2) ki = ~ki;
      else if (d == DR_NULL && ko) d = to_dr($urandom % 2);
      else if (d != DR_NULL && !ko) d = DR_NULL;
      #5;
      if (ki && d != DR_NULL) qref = d;
      else if (!ki && d == DR_NULL) qref = DR_NULL;
      expect_q(qref, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
