// tb_ncl_xbar_adder_wide: end-to-end test of the clock-free crossbar adder
// pipeline with a 4-bit ripple-carry adder between the register banks
// (the same environment as tb_ncl_xbar_adder, at WIDTH = 4).
//
// A producer process plays the preceding stage: it waits for Ko = request
// for data, presents a random operand word whose dual-rail bits arrive one
// at a time in random order, waits for Ko = request for null, and withdraws
// the bits in random order. A consumer process plays the successive stage:
// it waits until every output bit is DATA, compares the word with the sum
// of the operands, sometimes stalls before answering, drops Ki to request
// NULL, waits until every output bit is NULL and raises Ki again.
// Checked: every result, that no output word completes before the producer
// has finished a word, that outputs stay unchanged while the consumer
// stalls, and that no illegal code 11 appears. Counted mechanisms: DATA and
// NULL wavefronts at the output, request-for-null and request-for-data on
// Ko, consumer stalls, and words that arrived at the input while the
// pipeline was still held by a stall (back-pressure); each must occur.
module tb_ncl_xbar_adder_wide;
  import ncl_pkg::*;
  localparam int W     = 4;
  localparam int NI    = 2 * W + 1;
  localparam int WORDS = 400;

  logic         rst, ko, ki;
  dr_t [NI-1:0] in;      // a bits, then b bits, then ci
  dr_t [W-1:0]  s;
  dr_t          co;
  int           checks = 0, failures = 0;
  int           n_data = 0, n_null = 0, n_rfn = 0, n_rfd = 0, n_stall = 0, n_backpressure = 0;
  bit           producing, stalling, done;
  bit [W:0]     expq [$];

  ncl_xbar_adder #(.WIDTH(W)) dut (
    .rst(rst), .a(in[W-1:0]), .b(in[2*W-1:W]), .ci(in[2*W]),
    .ko(ko), .s(s), .co(co), .ki(ki)
  );

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit out_data();
    if (!is_data(co)) return 1'b0;
    foreach (s[i]) if (!is_data(s[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit out_null();
    if (!is_null(co)) return 1'b0;
    foreach (s[i]) if (!is_null(s[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit [W:0] out_word();
    bit [W:0] v;
    foreach (s[i]) v[i] = s[i].r1;
    v[W] = co.r1;
    return v;
  endfunction

  always @(s or co) begin
    if (!rst) begin
      if (co.r0 && co.r1) begin
        failures++;
        $display("FAIL illegal code on co");
      end
      foreach (s[i]) if (s[i].r0 && s[i].r1) begin
        failures++;
        $display("FAIL illegal code on s[%0d]", i);
      end
    end
  end

  logic out_is_data, out_is_null;
  always_comb begin
    out_is_data = out_data();
    out_is_null = out_null();
  end

  always @(negedge ko) if (!rst) n_rfn++;
  always @(posedge ko) if (!rst) n_rfd++;

  // Producer: the preceding stage.
  initial begin
    bit [W-1:0] a, b;
    bit         c;
    bit [NI-1:0] v;
    int order [NI];
    rst = 1'b1; ki = 1'b1; in = '0; producing = 1'b0; done = 1'b0; stalling = 1'b0;
    #10;
    rst = 1'b0;
    #10;
    for (int k = 0; k < WORDS; k++) begin
      wait (ko == 1'b1);
      a = W'($urandom);
      b = W'($urandom);
      c = 1'($urandom);
      v = {c, b, a};
      expq.push_back((W+1)'(a) + (W+1)'(b) + (W+1)'(c));
      producing = 1'b1;
      for (int i = 0; i < NI; i++) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        #($urandom_range(1, 4));
        in[order[i]] = to_dr(v[order[i]]);
      end
      producing = 1'b0;
      // Back-pressure: the word is complete at the input but the consumer
      // still holds the previous result, so the input register must not
      // take it yet.
      if (stalling && ko) begin
        n_backpressure++;
        #1;
        checks++;
        if (!ko && stalling) begin
          failures++;
          $display("FAIL input word accepted while the pipeline was full");
        end
      end
      wait (ko == 1'b0);
      order.shuffle();
      foreach (order[i]) begin
        #($urandom_range(1, 4));
        in[order[i]] = DR_NULL;
      end
    end
    done = 1'b1;
  end

  // Consumer: the successive stage.
  initial begin
    bit [W:0] exp;
    dr_t [W:0] held;
    wait (!rst);
    #10;
    forever begin
      wait (out_is_data || done);
      if (!out_is_data) break;
      n_data++;
      checks++;
      if (producing && expq.size() == 1) begin
        failures++;
        $display("FAIL output word completed before its input word");
      end
      exp = expq.pop_front();
      checks++;
      if (out_word() != exp) begin
        failures++;
        $display("FAIL result %b expected %b", out_word(), exp);
      end
      if ($urandom % 4 == 0) begin
        n_stall++;
        stalling = 1'b1;
        held     = {co, s};
        repeat ($urandom_range(20, 60)) begin
          #1;
          checks++;
          if ({co, s} != held) begin
            failures++;
            $display("FAIL output changed during a stall: %b -> %b", held, {co, s});
          end
        end
        stalling = 1'b0;
      end
      #1 ki = 1'b0;
      wait (out_is_null);
      n_null++;
      #1 ki = 1'b1;
    end
  end

  initial begin
    wait (done);
    wait (expq.size() == 0);
    #50;
    $display("wavefronts: DATA=%0d NULL=%0d  Ko: rfn=%0d rfd=%0d  stalls=%0d back-pressure=%0d",
             n_data, n_null, n_rfn, n_rfd, n_stall, n_backpressure);
    checks++;
    if (n_data != WORDS || n_null != WORDS) begin
      failures++;
      $display("FAIL expected %0d DATA and NULL wavefronts", WORDS);
    end
    checks++; if (n_rfn == 0) begin failures++; $display("FAIL no request for null seen"); end
    checks++; if (n_rfd == 0) begin failures++; $display("FAIL no request for data seen"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no consumer stall"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
