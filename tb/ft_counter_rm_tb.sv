// ft_counter_rm_tb: checks the general Reed-Muller coded counter at 3, 4 and
// 5 stages, side by side.
//
// Fault free: from reset each counter must count 0, 1, 2, ... one step per
// clock with en = 1, wrap at 2**STAGES and hold while en = 0. Its check bits
// must equal the pairwise exclusive-ORs of the parity-check matrix for that
// width (rows written out here independently: 12 23 13 / 12 23 14 34 /
// 13 24 35 14 25).
// Single faults: for every stage i each of a[i], b[i], the toggle input of
// a[i] and the toggle input of b[i] is stuck, in turn, at 0 and at 1 for a
// full counting cycle plus three clocks. The corrected count must never
// deviate. A fault is counted as masked when the raw flip-flops left the
// code while the count stayed right.
module ft_counter_rm_tb;
  int checks = 0, failures = 0, masked = 0;
  logic clk = 0, rst = 1, en = 0;

  // fault selection, read by the per-bit force blocks below
  int   sel_n = 0, sel_kind = 0, sel_i = 0;
  logic sel_v = 0;
  logic active = 0;
  logic checking = 0;
  logic [5:0] expected = '0;   // wide enough for the 5-stage counter
  logic left_code = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected check bits, from the matrices of each width
  function automatic logic [5:1] code_bits(input int n, input logic [5:1] A);
    case (n)
      3:       return {2'b00, A[1] ^ A[3], A[2] ^ A[3], A[1] ^ A[2]};
      4:       return {1'b0, A[3] ^ A[4], A[1] ^ A[4], A[2] ^ A[3], A[1] ^ A[2]};
      default: return {A[2] ^ A[5], A[1] ^ A[4], A[3] ^ A[5], A[2] ^ A[4], A[1] ^ A[3]};
    endcase
  endfunction

  for (genvar n = 3; n <= 5; n++) begin : g_n
    logic [n:1]   a, b;
    logic [n-1:0] count;

    ft_counter_rm #(.STAGES(n)) dut (
      .clk(clk), .rst(rst), .en(en), .a(a), .b(b), .count(count));

    for (genvar i = 1; i <= n; i++) begin : g_i
      always @(active, sel_n, sel_kind, sel_i, sel_v) begin
        if (active && sel_n == n && sel_i == i) begin
          case (sel_kind)
            0:       force dut.a[i]  = sel_v;
            1:       force dut.b[i]  = sel_v;
            2:       force dut.ta[i] = sel_v;
            default: force dut.tb[i] = sel_v;
          endcase
        end else begin
          release dut.a[i];
          release dut.b[i];
          release dut.ta[i];
          release dut.tb[i];
        end
      end
    end

    logic [5:1] want_b;

    always @(negedge clk) begin
      if (checking && (!active || sel_n == n)) begin
        checks++;
        if (count != expected[n-1:0]) begin
          failures++;
          $display("FAIL n=%0d fault(kind=%0d i=%0d v=%0b): count=%0d expected=%0d a=%b b=%b",
                   n, sel_kind, sel_i, sel_v, count, expected[n-1:0], a, b);
        end
        want_b = code_bits(n, 5'(expected[n-1:0]));
        if (!active) begin
          checks++;
          if (a != expected[n-1:0] || b != want_b[n:1]) begin
            failures++;
            $display("FAIL n=%0d fault free: a=%b b=%b expected=%0d", n, a, b, expected[n-1:0]);
          end
        end else if (a != expected[n-1:0] || b != want_b[n:1]) begin
          left_code = 1;
        end
      end
    end
  end

  // one counting step of the reference
  always @(posedge clk) begin
    if (rst) expected <= '0;
    else if (en) expected <= expected + 6'd1;
  end

  task automatic clear();
    checking = 0;
    active = 0;
    rst = 1;
    en = 0;
    @(posedge clk);
    @(negedge clk);
    rst = 0;
  endtask

  initial begin
    // fault free: count a full cycle of the widest counter and a bit more;
    // the narrower ones wrap on the way
    clear();
    checking = 1;
    en = 1;
    repeat (70) @(negedge clk);
    en = 0;
    repeat (5) @(negedge clk);
    en = 1;
    repeat (5) @(negedge clk);

    for (int n = 3; n <= 5; n++)
      for (int kind = 0; kind < 4; kind++)
        for (int i = 1; i <= n; i++)
          for (int v = 0; v < 2; v++) begin
            clear();
            sel_n = n; sel_kind = kind; sel_i = i; sel_v = 1'(v);
            left_code = 0;
            active = 1;
            checking = 1;
            en = 1;
            repeat ((1 << n) + 3) @(negedge clk);
            checking = 0;
            if (left_code) masked++;
          end
    clear();

    $display("faults masked with the raw code disturbed: %0d of %0d", masked, 2 * 4 * (3 + 4 + 5));
    checks++;
    if (masked == 0) begin
      failures++;
      $display("FAIL no fault disturbed the raw flip-flops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
