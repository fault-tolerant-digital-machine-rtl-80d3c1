// ftdm_top_tb: end-to-end test of every machine in ftdm_top at its default
// size. Each machine is compared every clock with a reference model written
// here from its state graph or code.
//   Phase 1 (250 clocks, random inputs): no fault; every machine must follow
//     its model exactly.
//   Phase 2 (250 clocks): one fault in every machine at once. The fail-safe
//     machines get a stuck-at-0 gate and must reach their F-state and stay
//     there (000, 000, 111 for the NAND level-2 fault, 0000). The
//     fault-tolerant machines must keep their corrected outputs right: the
//     three-stage counter with a flip-flop stuck, the four-stage counter
//     with a toggle input stuck, each cell-block machine with one voted
//     wire between cells stuck, the Hamming PROM machine with a single
//     error in every stored word and one decoder stuck.
//   Phase 3: the two plain PROM machines are reprogrammed and must follow
//     the new arrow.
// Every mechanism (F-state entry for each fail-safe machine, counter wrap,
// masked faults, z = 1 outputs, ring wrap, Hamming correction, reprogram)
// is counted and a failure is recorded for any that never happened.
module ftdm_top_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;

  logic       fs_x = 0;
  logic [2:0] fs_tt_y, fs_km_y, fs_nand_y;
  logic [3:0] fs_auto_y;
  logic       fs_tt_fstate, fs_km_fstate, fs_nand_fstate0, fs_nand_fstate1, fs_auto_fstate;
  logic       cnt_en = 0;
  logic [2:0] cnt_a, cnt_b, cnt_count;
  logic       rcnt_en = 0;
  logic [3:0] rcnt_a, rcnt_b, rcnt_count;
  logic       cm_x = 0;
  logic [2:0] cm_cell_q [3];
  logic [2:0] cm_z;
  logic       ring_x = 0;
  logic [6:0] ring_state [3];
  logic       rs1_x = 0, rs1_z, rs1_we = 0;
  logic [3:0] rs1_state, rs1_paddr = 0;
  logic [9:0] rs1_pdata = 0;
  logic       rs2_x = 0, rs2_z, rs2_we = 0;
  logic [2:0] rs2_state;
  logic [3:0] rs2_paddr = 0, rs2_pdata = 0;
  logic       ftr_x = 0, ftr_z, ftr_we = 0;
  logic [2:0] ftr_state, ftr_syndrome;
  logic [2:0] ftr_buf_state [3];
  logic [3:0] ftr_paddr = 0;
  logic [6:0] ftr_pdata = 0;

  ftdm_top dut (
    .clk(clk), .rst(rst),
    .fs_x(fs_x), .fs_tt_y(fs_tt_y), .fs_tt_fstate(fs_tt_fstate),
    .fs_km_y(fs_km_y), .fs_km_fstate(fs_km_fstate),
    .fs_nand_y(fs_nand_y), .fs_nand_fstate0(fs_nand_fstate0), .fs_nand_fstate1(fs_nand_fstate1),
    .fs_auto_y(fs_auto_y), .fs_auto_fstate(fs_auto_fstate),
    .cnt_en(cnt_en), .cnt_a(cnt_a), .cnt_b(cnt_b), .cnt_count(cnt_count),
    .rcnt_en(rcnt_en), .rcnt_a(rcnt_a), .rcnt_b(rcnt_b), .rcnt_count(rcnt_count),
    .cm_x(cm_x), .cm_cell_q(cm_cell_q), .cm_z(cm_z),
    .ring_x(ring_x), .ring_state(ring_state),
    .rs1_x(rs1_x), .rs1_state(rs1_state), .rs1_z(rs1_z),
    .rs1_prog_we(rs1_we), .rs1_prog_addr(rs1_paddr), .rs1_prog_data(rs1_pdata),
    .rs2_x(rs2_x), .rs2_state(rs2_state), .rs2_z(rs2_z),
    .rs2_prog_we(rs2_we), .rs2_prog_addr(rs2_paddr), .rs2_prog_data(rs2_pdata),
    .ftr_x(ftr_x), .ftr_state(ftr_state), .ftr_buf_state(ftr_buf_state), .ftr_z(ftr_z),
    .ftr_syndrome(ftr_syndrome),
    .ftr_prog_we(ftr_we), .ftr_prog_addr(ftr_paddr), .ftr_prog_data(ftr_pdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- models
  logic [2:0] fs_code [3] = '{3'b011, 3'b101, 3'b110};
  logic [3:0] auto_seq [4] = '{4'b1001, 4'b0011, 4'b0101, 4'b1010};

  function automatic int step5(input int st, input logic xi, output logic o);
    case (st)
      0: begin o = 0;  return xi ? 1 : 3; end
      1: begin o = 0;  return xi ? 2 : 0; end
      2: begin o = xi; return xi ? 3 : 0; end
      3: begin o = xi; return xi ? 4 : 3; end
      4: begin o = xi; return xi ? 0 : 4; end
      default: begin o = 0; return 0; end
    endcase
  endfunction

  function automatic logic [6:0] encode(input int nxt, input logic o);
    logic [1:7] w;
    w = '0;
    w[3] = nxt[2]; w[5] = nxt[1]; w[6] = nxt[0]; w[7] = o;
    w[1] = w[3] ^ w[5] ^ w[7];
    w[2] = w[3] ^ w[6] ^ w[7];
    w[4] = w[5] ^ w[6] ^ w[7];
    return w;
  endfunction

  function automatic logic vote(input logic [2:0] v);
    return (v[0] & v[1]) | (v[1] & v[2]) | (v[0] & v[2]);
  endfunction

  function automatic logic [6:0] vote7(input logic [6:0] a, b, c);
    return (a & b) | (b & c) | (a & c);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state
  int s_fs, s_auto, s_cnt, s_rcnt, s_cm, s_ring, s_rs1, s_rs2, s_ftr;
  // mechanism counters
  int n_fs_tt = 0, n_fs_km = 0, n_fs_nand0 = 0, n_fs_nand1 = 0, n_fs_auto = 0;
  int n_cnt_wrap = 0, n_cnt_masked = 0, n_cm_z = 0, n_cm_masked = 0;
  int n_ring_wrap = 0, n_ring_masked = 0, n_rs_z = 0, n_ftr_corr = 0, n_ftr_masked = 0;
  int n_reprog = 0, n_rcnt_wrap = 0, n_rcnt_masked = 0;

  // one clock of every machine; faulty = fail-safe machines are faulty
  task automatic cycle(input bit faulty);
    logic o1, o2, o3, ocm;
    int n1, n2, n3;
    logic [6:0] exp_ring;
    fs_x = 1'($urandom); cm_x = 1'($urandom); ring_x = 1'($urandom);
    rs1_x = 1'($urandom); rs2_x = 1'($urandom); ftr_x = 1'($urandom);
    #1;
    // fail-safe machines
    if (!faulty) begin
      check(fs_tt_y == fs_code[s_fs] && fs_km_y == fs_code[s_fs] && fs_nand_y == fs_code[s_fs],
            "fail-safe 3-state machines");
      check(fs_auto_y == auto_seq[s_auto], "fail-safe autonomous cycle");
    end else begin
      if (fs_tt_fstate)    n_fs_tt++;
      if (fs_km_fstate)    n_fs_km++;
      if (fs_nand_fstate1) n_fs_nand1++;
      if (fs_auto_fstate)  n_fs_auto++;
    end
    // counter: corrected count
    check(cnt_count == 3'(s_cnt), "counter");
    if (faulty && cnt_a != 3'(s_cnt)) n_cnt_masked++;
    check(rcnt_count == 4'(s_rcnt), "four-stage counter");
    if (faulty && rcnt_a != 4'(s_rcnt)) n_rcnt_masked++;
    // cell-block machine
    ocm = (s_cm == 2) && cm_x;
    for (int st = 0; st < 3; st++) check(vote(cm_cell_q[st]) == (st == s_cm), "cell machine state");
    check(vote(cm_z) == ocm, "cell machine z");
    if (ocm) n_cm_z++;
    if (faulty && (cm_cell_q[2] != {3{s_cm == 2}} || cm_z != {3{ocm}})) n_cm_masked++;
    // ring
    exp_ring = 7'(1) << s_ring;
    check(vote7(ring_state[0], ring_state[1], ring_state[2]) == exp_ring, "ring");
    if (faulty && (ring_state[0] != exp_ring || ring_state[1] != exp_ring)) n_ring_masked++;
    // PROM machines
    n1 = step5(s_rs1, rs1_x, o1);
    n2 = step5(s_rs2, rs2_x, o2);
    n3 = step5(s_ftr, ftr_x, o3);
    check(rs1_state == 4'(s_rs1) && rs1_z == o1, "PROM system 1");
    check(rs2_state == 3'(s_rs2) && rs2_z == o2, "PROM system 2");
    check(ftr_state == 3'(s_ftr) && ftr_z == o3, "fault-tolerant PROM system");
    if (o1 || o2) n_rs_z++;
    if (ftr_syndrome != 0) n_ftr_corr++;
    if (faulty && ftr_buf_state[1] != ftr_state) n_ftr_masked++;
    @(negedge clk);
    // advance the models
    if (fs_x) s_fs = (s_fs + 1) % 3;
    s_auto = (s_auto + 1) % 4;
    s_cnt = (s_cnt + 1) % 8;
    if (s_cnt == 0) n_cnt_wrap++;
    s_rcnt = (s_rcnt + 1) % 16;
    if (s_rcnt == 0) n_rcnt_wrap++;
    s_cm = !cm_x ? 0 : (s_cm == 0 ? 1 : 2);
    if (ring_x) begin
      s_ring = (s_ring + 1) % 7;
      if (s_ring == 0) n_ring_wrap++;
    end
    s_rs1 = n1; s_rs2 = n2; s_ftr = n3;
  endtask

  initial begin
    logic o;
    int nxt;
    @(negedge clk);
    rst = 0; cnt_en = 1; rcnt_en = 1;
    s_fs = 0; s_auto = 0; s_cnt = 0; s_rcnt = 0; s_cm = 0; s_ring = 0; s_rs1 = 0; s_rs2 = 0; s_ftr = 0;

    // phase 1: no fault
    repeat (250) cycle(0);

    // phase 2: one fault per machine
    for (int a = 0; a < 16; a++) begin   // single error in every stored word
      nxt = step5(a >> 1, a[0], o);
      ftr_pdata = encode(nxt, o);
      ftr_pdata[a % 7] ^= 1'b1;
      ftr_we = 1; ftr_paddr = 4'(a);
      #1;
      @(negedge clk);
      ftr_we = 0;
      // the other machines keep running meanwhile; keep their models in step
      if (fs_x) s_fs = (s_fs + 1) % 3;
      s_auto = (s_auto + 1) % 4;
      s_cnt = (s_cnt + 1) % 8;
      s_rcnt = (s_rcnt + 1) % 16;
      s_cm = !cm_x ? 0 : (s_cm == 0 ? 1 : 2);
      if (ring_x) s_ring = (s_ring + 1) % 7;
      s_rs1 = step5(s_rs1, rs1_x, o);
      s_rs2 = step5(s_rs2, rs2_x, o);
      s_ftr = step5(s_ftr, ftr_x, o);
    end
    force dut.u_fs_tt.p13_1   = 1'b0;
    force dut.u_fs_km.t13     = 1'b0;
    force dut.u_fs_nand.n13   = 1'b0;
    force dut.u_fs_auto.a13   = 1'b0;
    force dut.u_cnt.a[2]      = 1'b1;
    force dut.u_rcnt.ta[3]    = 1'b1;
    force dut.u_cm.ox1[1][0]  = 1'b1;
    force dut.u_ring.ox0[2][1] = 1'b0;
    force dut.u_ftr.dec_next[1] = 3'b101;
    repeat (250) cycle(1);
    check(fs_tt_y == 3'b000 && fs_km_y == 3'b000 && fs_nand_y == 3'b111 && fs_auto_y == 4'b0000,
          "fail-safe machines end in their F-states");

    // phase 3: reprogram the plain PROM machines (q0, x = 0 -> q2 with z = 1)
    rs1_we = 1; rs1_paddr = 0; rs1_pdata = {4'd1, 1'b0, 4'd2, 1'b1};
    rs2_we = 1; rs2_paddr = 0; rs2_pdata = {3'd2, 1'b1};
    @(negedge clk);
    rs1_we = 0; rs2_we = 0;
    rst = 1; @(negedge clk); rst = 0;
    rs1_x = 0; rs2_x = 0; #1;
    check(rs1_z == 1 && rs2_z == 1, "reprogrammed outputs");
    @(negedge clk);
    check(rs1_state == 4'd2 && rs2_state == 3'd2, "reprogrammed arrows");
    if (rs1_state == 4'd2 && rs2_state == 3'd2) n_reprog++;

    $display("mechanisms: fs_tt=%0d fs_km=%0d fs_nand111=%0d fs_auto=%0d cnt_wrap=%0d cnt_masked=%0d",
             n_fs_tt, n_fs_km, n_fs_nand1, n_fs_auto, n_cnt_wrap, n_cnt_masked);
    $display("mechanisms: rcnt_wrap=%0d rcnt_masked=%0d", n_rcnt_wrap, n_rcnt_masked);
    $display("mechanisms: cm_z=%0d cm_masked=%0d ring_wrap=%0d ring_masked=%0d rs_z=%0d ftr_corr=%0d ftr_masked=%0d reprog=%0d",
             n_cm_z, n_cm_masked, n_ring_wrap, n_ring_masked, n_rs_z, n_ftr_corr, n_ftr_masked, n_reprog);
    check(n_fs_tt > 0,     "mechanism: F-state 000, transition-table machine");
    check(n_fs_km > 0,     "mechanism: F-state 000, Karnaugh-map machine");
    check(n_fs_nand1 > 0,  "mechanism: F-state 111, NAND machine");
    check(n_fs_auto > 0,   "mechanism: F-state 0000, autonomous machine");
    check(n_cnt_wrap > 0,  "mechanism: counter wrap");
    check(n_cnt_masked > 0, "mechanism: counter fault masked");
    check(n_rcnt_wrap > 0, "mechanism: four-stage counter wrap");
    check(n_rcnt_masked > 0, "mechanism: four-stage counter fault masked");
    check(n_cm_z > 0,      "mechanism: cell machine output z");
    check(n_cm_masked > 0, "mechanism: cell machine fault masked");
    check(n_ring_wrap > 0, "mechanism: ring wrap");
    check(n_ring_masked > 0, "mechanism: ring fault masked");
    check(n_rs_z > 0,      "mechanism: PROM machine output");
    check(n_ftr_corr > 0,  "mechanism: Hamming correction");
    check(n_ftr_masked > 0, "mechanism: PROM lane fault masked");
    check(n_reprog > 0,    "mechanism: reprogramming");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
