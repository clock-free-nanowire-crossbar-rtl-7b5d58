// tb_ncl_fa_xbar: self-checking test of the crossbar full adder.
//
// Every operand combination is applied many times as an NCL wavefront: the
// three dual-rail inputs arrive one by one in random order, the sum and
// carry are compared with a + b + ci, then the inputs leave one by one and
// the outputs must not all return to NULL, nor change value, until the last
// input has returned to NULL (input completeness; a single output such as
// the carry may return early). No output may ever show the illegal code 11.
module tb_ncl_fa_xbar;
  import ncl_pkg::*;

  logic rst;
  dr_t  in [3];
  dr_t  s, co;
  int   checks = 0, failures = 0;

  ncl_fa_xbar dut (.rst(rst), .a(in[0]), .b(in[1]), .ci(in[2]), .s(s), .co(co));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(s or co) begin
    if ((s.r0 && s.r1) || (co.r0 && co.r1)) begin
      failures++;
      $display("FAIL illegal code: s=%b co=%b", s, co);
    end
  end

  task automatic expect_out(dr_t es, dr_t eco, string what);
    checks++;
    if (s !== es || co !== eco) begin
      failures++;
      $display("FAIL %s: s=%b co=%b expected s=%b co=%b", what, s, co, es, eco);
    end
  endtask

  initial begin
    int order [3];
    bit [2:0] v;
    int sum;
    rst = 1'b1;
    foreach (in[i]) in[i] = DR_NULL;
    #5;
    rst = 1'b0;
    #5;
    expect_out(DR_NULL, DR_NULL, "after reset");
    for (int k = 0; k < 400; k++) begin
      v   = 3'(k % 8);
      sum = v[0] + v[1] + v[2];
      order = '{0, 1, 2};
      order.shuffle();
      foreach (order[i]) begin
        in[order[i]] = to_dr(v[order[i]]);
        #4;
      end
      expect_out(to_dr(sum[0]), to_dr(sum[1]), $sformatf("DATA a=%0d b=%0d ci=%0d", v[0], v[1], v[2]));
      order.shuffle();
      for (int i = 0; i < 2; i++) begin
        in[order[i]] = DR_NULL;
        #4;
        checks++;
        if ((s == DR_NULL && co == DR_NULL) ||
            (s != DR_NULL && s != to_dr(sum[0])) ||
            (co != DR_NULL && co != to_dr(sum[1]))) begin
          failures++;
          $display("FAIL partial NULL: s=%b co=%b", s, co);
        end
      end
      in[order[2]] = DR_NULL;
      #4;
      expect_out(DR_NULL, DR_NULL, "NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
