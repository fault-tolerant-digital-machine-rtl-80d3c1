// ft_counter_rm: single-fault-tolerant binary counter of 3, 4 or 5 stages.
//
// This is the general form of the construction used by ft_counter. A
// STAGES-bit up counter (information bits A[STAGES:1]) carries STAGES check
// bits. Each check bit is the exclusive-OR of two information bits. The
// pairs are taken from the parity-check matrix for that width, written
// row by row as the positions of the two ones:
//   3 stages: 12 23 13         (B1 = A1^A2, B2 = A2^A3, B3 = A1^A3)
//   4 stages: 12 23 14 34
//   5 stages: 13 24 35 14 25
// In each of these matrices every information bit appears in exactly two
// rows, so it can be rebuilt three ways (itself, and through each of its two
// rows). The Reed-Muller majority element (rm_majority_element) takes the
// 2-of-3 vote of those three estimates.
//
// All flip-flops are T type. Counting up, information bit k toggles when all
// lower bits are 1, TA_k = A1.A2...A(k-1). A check bit B = Ap ^ Aq toggles
// when exactly one of its two bits toggles, TB = TA_p ^ TA_q.
// No toggle input shares a majority element with another one. Each toggle
// input has its own private set of elements, one for each information bit
// it reads. Thus:
//   * a single wrong flip-flop is outvoted in every element;
//   * a single faulty element or gate can spoil only one toggle input, so
//     at most one flip-flop.
// Either way the fault is masked. The corrected count is produced by
// STAGES more elements.
//
// This uses more elements than the minimised 3-stage circuit (ft_counter),
// which shares literals between gates where its equations allow. The check
// matrices, T flip-flops and majority elements follow the source. The
// source gives no circuit for 4 or 5 stages, so the toggle equations are
// derived here by the same rule. The private element sets, the reset to all
// zero and the enable are this design's choices.
//
// Interface: clk, rst (synchronous, loads the all-zero code word), en
// (count enable); a and b are the raw flip-flops, count the corrected value.
// Timing: count advances by one on each rising clock edge with en = 1.
module ft_counter_rm #(
  parameter int STAGES = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  output logic [STAGES:1]   a,
  output logic [STAGES:1]   b,
  output logic [STAGES-1:0] count
);
  // Position (1-based) of the k-th one (k = 0, 1) in information row r
  // (1-based) of the parity-check matrix for n stages.
  function automatic int pos(input int n, input int r, input int k);
    int d3 [6]  = '{1, 2, 2, 3, 1, 3};
    int d4 [8]  = '{1, 2, 2, 3, 1, 4, 3, 4};
    int d5 [10] = '{1, 3, 2, 4, 3, 5, 1, 4, 2, 5};
    case (n)
      3:       return d3[2*(r-1)+k];
      4:       return d4[2*(r-1)+k];
      default: return d5[2*(r-1)+k];
    endcase
  endfunction

  // The k-th (k = 0, 1) row that contains information bit i.
  function automatic int row_of(input int n, input int i, input int k);
    int found = 0;
    for (int r = 1; r <= n; r++)
      if (pos(n, r, 0) == i || pos(n, r, 1) == i) begin
        if (found == k) return r;
        found++;
      end
    return 1;
  endfunction

  // The other information bit of row r, seen from bit i.
  function automatic int partner(input int n, input int r, input int i);
    return (pos(n, r, 0) == i) ? pos(n, r, 1) : pos(n, r, 0);
  endfunction

  // Highest information bit read by toggle input t (t = 1..STAGES: TA_t,
  // t = STAGES+1..2*STAGES: TB of row t-STAGES).
  function automatic int reads_up_to(input int n, input int t);
    int p, q;
    if (t <= n) return t - 1;
    p = pos(n, t - n, 0);
    q = pos(n, t - n, 1);
    return ((p > q) ? p : q) - 1;
  endfunction

  // corr[t][i]: information bit i as rebuilt for toggle input t.
  logic [STAGES:1] corr [1:2*STAGES];
  logic [STAGES:1] ta, tb;

  for (genvar t = 1; t <= 2 * STAGES; t++) begin : g_tog
    for (genvar i = 1; i <= STAGES; i++) begin : g_bit
      if (i <= reads_up_to(STAGES, t)) begin : g_el
        localparam int R0 = row_of(STAGES, i, 0);
        localparam int R1 = row_of(STAGES, i, 1);
        rm_majority_element u_el (
          .a(a[i]),
          .b(a[partner(STAGES, R0, i)]), .c(b[R0]),
          .d(a[partner(STAGES, R1, i)]), .e(b[R1]),
          .y(corr[t][i]));
      end else begin : g_none
        assign corr[t][i] = 1'b1;   // not read by this toggle input
      end
    end
  end

  // Bits 1..k-1 set: the bits whose product gives TA_k.
  function automatic logic [STAGES:1] below(input int k);
    logic [STAGES:1] m = '0;
    for (int j = 1; j <= STAGES; j++) m[j] = (j < k);
    return m;
  endfunction

  for (genvar k = 1; k <= STAGES; k++) begin : g_t
    localparam logic [STAGES:1] MA = below(k);
    localparam logic [STAGES:1] MP = below(pos(STAGES, k, 0));
    localparam logic [STAGES:1] MQ = below(pos(STAGES, k, 1));
    assign ta[k] = &(corr[k] | ~MA);
    assign tb[k] = (&(corr[STAGES + k] | ~MP)) ^ (&(corr[STAGES + k] | ~MQ));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
    end else if (en) begin
      a <= a ^ ta;
      b <= b ^ tb;
    end
  end

  // corrected count
  for (genvar i = 1; i <= STAGES; i++) begin : g_out
    localparam int R0 = row_of(STAGES, i, 0);
    localparam int R1 = row_of(STAGES, i, 1);
    rm_majority_element u_out (
      .a(a[i]),
      .b(a[partner(STAGES, R0, i)]), .c(b[R0]),
      .d(a[partner(STAGES, R1, i)]), .e(b[R1]),
      .y(count[i-1]));
  end
endmodule
