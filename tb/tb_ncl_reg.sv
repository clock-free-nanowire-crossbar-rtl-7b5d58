// tb_ncl_reg: self-checking test of the N-bit NCL register bank (N = 3).
//
// Each round follows the four-phase handshake. With Ki = request for data,
// the bits of a random DATA word arrive one at a time in random order; Ko
// must stay at request for data until the last bit is in, then fall, and q
// must equal the word. Ki then drops, the bits return to NULL one by one, and
// Ko must stay low until the last bit has left, then rise. A DATA word
// presented while Ki is request for null must not pass.
module tb_ncl_reg;
  import ncl_pkg::*;
  localparam int N = 3;

  logic         rst, ki, ko;
  dr_t [N-1:0]  d, q;
  int           checks = 0, failures = 0;

  ncl_reg #(.N(N)) dut (.rst(rst), .d(d), .ki(ki), .q(q), .ko(ko));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(dr_t [N-1:0] eq, logic eko, string what);
    checks++;
    if (q !== eq || ko !== eko) begin
      failures++;
      $display("FAIL %s: q=%b ko=%b expected q=%b ko=%b", what, q, ko, eq, eko);
    end
  endtask

  initial begin
    dr_t [N-1:0] word, partial;
    int order [N];
    rst = 1'b1; ki = 1'b1; d = '0;
    #5;
    rst = 1'b0;
    #5;
    expect_state('0, 1'b1, "after reset");
    for (int k = 0; k < 300; k++) begin
      for (int i = 0; i < N; i++) word[i] = to_dr($urandom % 2);
      for (int i = 0; i < N; i++) order[i] = i;
      order.shuffle();
      partial = '0;
      for (int i = 0; i < N; i++) begin
        d[order[i]] = word[order[i]];
        partial[order[i]] = word[order[i]];
        #4;
        expect_state(partial, (i == N - 1) ? 1'b0 : 1'b1, "DATA arrival");
      end
      ki = 1'b0;
      #4;
      expect_state(word, 1'b0, "DATA held on rfn");
      order.shuffle();
      for (int i = 0; i < N; i++) begin
        d[order[i]] = DR_NULL;
        partial[order[i]] = DR_NULL;
        #4;
        expect_state(partial, (i == N - 1) ? 1'b1 : 1'b0, "NULL arrival");
      end
      // A new word while the next stage still asks for NULL is blocked.
      d = word;
      #4;
      expect_state('0, 1'b1, "DATA blocked on rfn");
      ki = 1'b1;
      #4;
      expect_state(word, 1'b0, "blocked DATA passes on rfd");
      ki = 1'b0;
      d  = '0;
      #4;
      expect_state('0, 1'b1, "NULL");
      ki = 1'b1;
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
