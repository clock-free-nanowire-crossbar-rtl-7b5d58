// tb_xbar: self-checking test of the cross-point array.
// Random input vectors and random crosspoint programmings (single-point
// routes and several points per wire) are compared with a bit-by-bit
// wired-OR reference.
module tb_xbar;
  localparam int N_IN = 7, N_OUT = 5;
  logic [N_IN-1:0]            in;
  logic [N_OUT-1:0][N_IN-1:0] cfg;
  logic [N_OUT-1:0]           out;
  int checks = 0, failures = 0;

  xbar #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.in(in), .cfg(cfg), .out(out));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    for (int k = 0; k < 2000; k++) begin
      in = N_IN'($urandom);
      for (int j = 0; j < N_OUT; j++)
        cfg[j] = (k % 2 == 0) ? N_IN'(1 << ($urandom % N_IN)) : N_IN'($urandom);
      #1;
      for (int j = 0; j < N_OUT; j++) begin
        exp = 1'b0;
        for (int i = 0; i < N_IN; i++) if (cfg[j][i] && in[i]) exp = 1'b1;
        checks++;
        if (out[j] !== exp) begin
          failures++;
          $display("FAIL out[%0d]=%b expected %b (in=%b cfg=%b)", j, out[j], exp, in, cfg[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
