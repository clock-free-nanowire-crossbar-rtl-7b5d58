// ncl_pkg: types and constants shared by the clock-free crossbar design.
//
// A Null Convention Logic (NCL) signal is carried on two rails. The pair
// (rail1, rail0) = 00 is NULL, the spacer that separates two data words;
// 01 is DATA0, 10 is DATA1, and 11 is an illegal code that only a fault can
// produce. Which DATA value each one-hot code stands for is this design's
// choice (the usual NCL convention); NULL = 00 and "11 is invalid" follow the
// architecture description.
//
// A programmable gate macro block (PGMB) is a small diode crossbar: an AND
// plane of PGMB_PT product-term columns crossed by PGMB_IN input rows and one
// feedback row (the gate's own output), and an OR plane row that sums the
// selected columns. pgmb_cfg_t holds which crosspoints are programmed.
// th_cfg() computes the crosspoints for a threshold gate THmn with an
// optional integer weight per input: the output asserts when the weighted sum
// of asserted inputs reaches m, and then holds until every input is
// deasserted (hysteresis), i.e. Z = set(inputs) + (A+B+C+D)*Z*.
// The set function is written as the OR of all minimal input subsets whose
// weight reaches m; the hold part adds one column x_i*Z* per input.
package ncl_pkg;

  // Dual-rail NCL bit, field order (rail1, rail0).
  typedef struct packed {
    logic r1;
    logic r0;
  } dr_t;

  localparam dr_t DR_NULL  = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_DATA0 = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1 = '{r1: 1'b1, r0: 1'b0};

  // PGMB geometry: four gate inputs (the largest NCL threshold gate has four)
  // and ten product-term columns, enough for TH24, the threshold gate with
  // the most terms (six set terms and four hold terms). TH23 uses six
  // columns and TH34w2 eight.
  localparam int unsigned PGMB_IN = 4;
  localparam int unsigned PGMB_PT = 10;

  typedef struct packed {
    logic [PGMB_PT-1:0][PGMB_IN-1:0] and_in;  // crosspoint: input row i on column p
    logic [PGMB_PT-1:0]              and_fb;  // crosspoint: feedback row on column p
    logic [PGMB_PT-1:0]              or_pt;   // crosspoint: column p on the output row
  } pgmb_cfg_t;

  localparam pgmb_cfg_t PGMB_UNUSED = '0;

  function automatic bit is_null(dr_t d);
    return (d.r1 == 1'b0) && (d.r0 == 1'b0);
  endfunction

  function automatic bit is_data(dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  function automatic dr_t to_dr(bit v);
    return v ? DR_DATA1 : DR_DATA0;
  endfunction

  // Crosspoint programming for threshold gate TH<m><n> with weights w0..w3
  // on inputs A..D (n <= 4; unused weights are ignored). A weight of 1 on
  // every input gives the plain THmn gate; TH34w2 is n=4, m=3, w0=2.
  function automatic pgmb_cfg_t th_cfg(int unsigned n, int unsigned m,
                                       int unsigned w0 = 1, int unsigned w1 = 1,
                                       int unsigned w2 = 1, int unsigned w3 = 1);
    pgmb_cfg_t   c;
    int unsigned w [PGMB_IN];
    int unsigned col;
    bit          minimal;
    c     = '0;
    w[0]  = w0;
    w[1]  = w1;
    w[2]  = w2;
    w[3]  = w3;
    col   = 0;
    // Set part: every minimal subset of inputs whose weight reaches m.
    for (int unsigned s = 1; s < (1 << n); s++) begin
      if (subset_weight(s, w) >= m) begin
        minimal = 1'b1;
        for (int unsigned i = 0; i < n; i++)
          if (s[i] && subset_weight(s & ~(1 << i), w) >= m) minimal = 1'b0;
        if (minimal && col < PGMB_PT) begin
          c.and_in[col] = PGMB_IN'(s);
          c.or_pt[col]  = 1'b1;
          col++;
        end
      end
    end
    // Hold part: input i together with the fed-back output. A single-input
    // term already covers it when m equals that input's weight or less.
    for (int unsigned i = 0; i < n; i++) begin
      if (w[i] < m && col < PGMB_PT) begin
        c.and_in[col][i] = 1'b1;
        c.and_fb[col]    = 1'b1;
        c.or_pt[col]     = 1'b1;
        col++;
      end
    end
    return c;
  endfunction

  function automatic int unsigned subset_weight(int unsigned s, int unsigned w [PGMB_IN]);
    int unsigned sum;
    sum = 0;
    for (int unsigned i = 0; i < PGMB_IN; i++)
      if (s[i]) sum += w[i];
    return sum;
  endfunction

  // Gates used by the adder and the register.
  localparam pgmb_cfg_t CFG_TH12   = th_cfg(2, 1);
  localparam pgmb_cfg_t CFG_TH22   = th_cfg(2, 2);
  localparam pgmb_cfg_t CFG_TH23   = th_cfg(3, 2);
  localparam pgmb_cfg_t CFG_TH34W2 = th_cfg(4, 3, 2, 1, 1, 1);

endpackage
