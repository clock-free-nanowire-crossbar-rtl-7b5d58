// tb_pgmb: self-checking test of one programmable gate macro block.
//
// The PGMB is programmed, through ncl_pkg::th_cfg, as each of the 24 NCL
// threshold gates (THmn with weights) and driven with random input vectors,
// including non-monotonic ones. A behavioural reference computes the
// weighted sum: Z rises when it reaches the threshold, falls when every
// input is 0, and otherwise keeps its value. Reset is checked too.
module tb_pgmb;
  import ncl_pkg::*;

  localparam int NGATES = 24;
  // {n, m, w0, w1, w2, w3} of each gate
  int unsigned gates [NGATES][6] = '{
    '{2,1,1,1,1,1}, '{2,2,1,1,1,1}, '{3,1,1,1,1,1}, '{3,2,1,1,1,1},
    '{3,3,1,1,1,1}, '{3,2,2,1,1,1}, '{3,3,2,1,1,1}, '{4,1,1,1,1,1},
    '{4,2,1,1,1,1}, '{4,3,1,1,1,1}, '{4,4,1,1,1,1}, '{4,2,2,1,1,1},
    '{4,3,2,1,1,1}, '{4,4,2,1,1,1}, '{4,3,3,1,1,1}, '{4,4,3,1,1,1},
    '{4,2,2,2,1,1}, '{4,3,2,2,1,1}, '{4,4,2,2,1,1}, '{4,5,2,2,1,1},
    '{4,3,3,2,1,1}, '{4,5,3,2,1,1}, '{4,4,3,2,2,1}, '{4,5,3,2,2,1}
  };

  logic        rst;
  pgmb_cfg_t   cfg;
  logic [3:0]  in;
  logic        z;
  int          checks = 0, failures = 0;
  bit          zref;

  pgmb dut (.rst(rst), .cfg(cfg), .in(in), .z(z));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit exp, string what);
    checks++;
    if (z !== exp) begin
      failures++;
      $display("FAIL %s: in=%b z=%b expected %b", what, in, z, exp);
    end
  endtask

  initial begin
    int unsigned sum;
    bit [3:0]    v;
    rst = 1'b1;
    in  = '0;
    cfg = CFG_TH23;
    #5;
    check(1'b0, "reset");
    for (int g = 0; g < NGATES; g++) begin
      int unsigned n, m;
      n   = gates[g][0];
      m   = gates[g][1];
      rst = 1'b1;
      in  = '0;
      cfg = th_cfg(n, m, gates[g][2], gates[g][3], gates[g][4], gates[g][5]);
      #5;
      rst  = 1'b0;
      zref = 1'b0;
      #5;
      for (int k = 0; k < 300; k++) begin
        v   = 4'($urandom);
        for (int i = 3; i >= int'(n); i--) v[i] = 1'b0;
        in  = v;
        #5;
        sum = 0;
        for (int i = 0; i < int'(n); i++) if (v[i]) sum += gates[g][2+i];
        if (sum >= m)   zref = 1'b1;
        else if (v == 0) zref = 1'b0;
        check(zref, $sformatf("TH%0d%0d w=%0d%0d%0d%0d", m, n, gates[g][2],
                              gates[g][3], gates[g][4], gates[g][5]));
      end
    end
    // Reset while the output is held high.
    cfg = CFG_TH22; in = 4'b0011; #5;
    check(1'b1, "TH22 set");
    rst = 1'b1; #5;
    check(1'b0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
