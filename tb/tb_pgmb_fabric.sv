// tb_pgmb_fabric: self-checking test of the PGMB grid and its routing.
//
// The 2x2 fabric is programmed as a small two-level NCL network:
//   g0 = TH23(pi0, pi1, pi2)   g1 = TH22(g0, pi3)
//   g2 = TH12(pi4, pi5)        g3 = TH34w2(g1, g2, pi0, pi5)
// with outputs po = {pi2, g3, g1, g0}. Inputs follow NCL wavefronts: from
// all-0 a random subset rises (in random order), then everything returns to
// 0. A reference evaluates the gates in dependency order with hysteresis.
module tb_pgmb_fabric;
  import ncl_pkg::*;
  localparam int NG = 4, N_PI = 6, N_PO = 4, N_TRK = 10, N_SRC = NG + N_PI;

  logic                               rst;
  logic [N_PI-1:0]                    pi;
  logic [N_PO-1:0]                    po;
  pgmb_cfg_t [NG-1:0]                 gate_cfg;
  logic [N_TRK-1:0][N_SRC-1:0]        src_cfg;
  logic [NG*PGMB_IN-1:0][N_TRK-1:0]   row_cfg;
  logic [N_PO-1:0][N_TRK-1:0]         out_cfg;
  int checks = 0, failures = 0;
  bit [3:0] gr;   // reference gate outputs

  pgmb_fabric dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit th(bit z, int unsigned m, int unsigned n, bit [3:0] x, int unsigned w0);
    int unsigned sum;
    sum = 0;
    for (int i = 0; i < int'(n); i++) if (x[i]) sum += (i == 0) ? w0 : 1;
    if (sum >= m) return 1'b1;
    if (x == 0)   return 1'b0;
    return z;
  endfunction

  task automatic evaluate_and_check();
    gr[0] = th(gr[0], 2, 3, {1'b0, pi[2], pi[1], pi[0]}, 1);
    gr[1] = th(gr[1], 2, 2, {2'b0, pi[3], gr[0]}, 1);
    gr[2] = th(gr[2], 1, 2, {2'b0, pi[5], pi[4]}, 1);
    gr[3] = th(gr[3], 3, 4, {pi[5], pi[0], gr[2], gr[1]}, 2);
    checks++;
    if (po !== {pi[2], gr[3], gr[1], gr[0]}) begin
      failures++;
      $display("FAIL pi=%b po=%b expected %b", pi, po, {pi[2], gr[3], gr[1], gr[0]});
    end
  endtask

  initial begin
    bit [N_PI-1:0] target;
    int order [N_PI];
    gate_cfg[0] = CFG_TH23;
    gate_cfg[1] = CFG_TH22;
    gate_cfg[2] = CFG_TH12;
    gate_cfg[3] = CFG_TH34W2;
    src_cfg = '0;
    for (int t = 0; t < N_TRK; t++) src_cfg[t][t] = 1'b1;
    row_cfg = '0;
    row_cfg[0*4+0][4] = 1; row_cfg[0*4+1][5] = 1; row_cfg[0*4+2][6] = 1;
    row_cfg[1*4+0][0] = 1; row_cfg[1*4+1][7] = 1;
    row_cfg[2*4+0][8] = 1; row_cfg[2*4+1][9] = 1;
    row_cfg[3*4+0][1] = 1; row_cfg[3*4+1][2] = 1; row_cfg[3*4+2][4] = 1; row_cfg[3*4+3][9] = 1;
    out_cfg = '0;
    out_cfg[0][0] = 1; out_cfg[1][1] = 1; out_cfg[2][3] = 1; out_cfg[3][6] = 1;
    rst = 1'b1;
    pi  = '0;
    gr  = '0;
    #5;
    rst = 1'b0;
    #5;
    evaluate_and_check();
    for (int k = 0; k < 500; k++) begin
      target = N_PI'($urandom);
      for (int i = 0; i < N_PI; i++) order[i] = i;
      order.shuffle();
      foreach (order[i]) begin
        if (target[order[i]]) begin
          pi[order[i]] = 1'b1;
          #3;
          evaluate_and_check();
        end
      end
      foreach (order[i]) begin
        pi[order[i]] = 1'b0;
        #3;
        evaluate_and_check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
