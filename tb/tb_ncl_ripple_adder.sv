// tb_ncl_ripple_adder: self-checking test of the ripple-carry adder at
// WIDTH = 4.
//
// Random operands are applied as NCL wavefronts whose dual-rail bits arrive
// in random order. While any input bit is still NULL, at least one output
// bit must still be NULL (the adder is input-complete as a whole); once all
// have arrived, the outputs must equal a + b + ci. The inputs then return to
// NULL in random order and every output must end NULL. No output may show
// the illegal code 11.
module tb_ncl_ripple_adder;
  import ncl_pkg::*;
  localparam int W  = 4;
  localparam int NI = 2 * W + 1;

  logic         rst;
  dr_t [NI-1:0] in;      // a bits, then b bits, then ci
  dr_t [W-1:0]  s;
  dr_t          co;
  int           checks = 0, failures = 0;

  ncl_ripple_adder #(.WIDTH(W)) dut (
    .rst(rst), .a(in[W-1:0]), .b(in[2*W-1:W]), .ci(in[2*W]), .s(s), .co(co)
  );

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_data(dr_t [W:0] v);
    foreach (v[i]) if (!is_data(v[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit all_null(dr_t [W:0] v);
    foreach (v[i]) if (!is_null(v[i])) return 1'b0;
    return 1'b1;
  endfunction

  always @(s or co) begin
    for (int i = 0; i < W; i++) if (s[i].r0 && s[i].r1) begin
      failures++;
      $display("FAIL illegal code on s[%0d]", i);
    end
    if (co.r0 && co.r1) begin
      failures++;
      $display("FAIL illegal code on co");
    end
  end

  initial begin
    bit [W-1:0] a, b;
    bit         c;
    bit [W:0]   sum, got;
    bit [NI-1:0] v;
    int order [NI];
    rst = 1'b1;
    in  = '0;
    #5;
    rst = 1'b0;
    #5;
    for (int k = 0; k < 300; k++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      c   = 1'($urandom);
      sum = a + b + c;
      v   = {c, b, a};
      for (int i = 0; i < NI; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < NI; i++) begin
        in[order[i]] = to_dr(v[order[i]]);
        #3;
        if (i < NI - 1) begin
          checks++;
          if (all_data({co, s})) begin
            failures++;
            $display("FAIL outputs complete before all inputs arrived");
          end
        end
      end
      #5;
      for (int i = 0; i < W; i++) got[i] = s[i].r1;
      got[W] = co.r1;
      checks++;
      if (!all_data({co, s}) || got != sum) begin
        failures++;
        $display("FAIL %0d + %0d + %0d: got %b (complete=%0d) expected %b", a, b, c, got,
                 all_data({co, s}), sum);
      end
      order.shuffle();
      for (int i = 0; i < NI; i++) begin
        in[order[i]] = DR_NULL;
        #3;
        if (i < NI - 1) begin
          checks++;
          if (all_null({co, s})) begin
            failures++;
            $display("FAIL outputs NULL before all inputs left");
          end
        end
      end
      #5;
      checks++;
      if (!all_null({co, s})) begin
        failures++;
        $display("FAIL outputs not NULL after NULL wavefront");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
