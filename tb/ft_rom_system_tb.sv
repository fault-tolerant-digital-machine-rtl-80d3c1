// ft_rom_system_tb: checks the Hamming-coded, triplicated PROM machine.
// The five-state graph (see rom_system1_tb) is the reference; every phase
// runs 150 random clocks and compares the voted state and z each clock.
//   1. fault free; all three buffers must agree and the syndrome stay 0;
//   2. memory errors: one bit of every stored word is inverted by
//      reprogramming (position chosen at random), so every read has a
//      single error; the decoders must correct it (syndrome seen != 0);
//   3. the next-address output of decoder 1 stuck at 000;
//   4. address buffer 2 stuck at 111;
//   5. reprogramming: a new graph (two states, x = 1 toggles, z = state) is
//      written as Hamming-coded words and must be followed.
module ft_rom_system_tb;
  int checks = 0, failures = 0, corrected = 0, masked = 0;
  logic clk = 0, rst = 1, x = 0, z;
  logic [2:0] state, syndrome;
  logic [2:0] buf_state [3];
  logic we = 0;
  logic [3:0] paddr = 0;
  logic [6:0] pdata = 0;
  int s;

  ft_rom_system dut (
    .clk(clk), .rst(rst), .x(x), .state(state), .buf_state(buf_state), .z(z),
    .syndrome(syndrome), .prog_we(we), .prog_addr(paddr), .prog_data(pdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic int step2(input int st, input logic xi, output logic o);
    o = st[0];
    return xi ? (st ^ 1) : st;
  endfunction

  // positions 1..7 from the left = bits 6..0
  function automatic logic [6:0] encode(input int nxt, input logic o);
    logic [1:7] w;
    w = '0;
    w[3] = nxt[2]; w[5] = nxt[1]; w[6] = nxt[0]; w[7] = o;
    w[1] = w[3] ^ w[5] ^ w[7];
    w[2] = w[3] ^ w[6] ^ w[7];
    w[4] = w[5] ^ w[6] ^ w[7];
    return w;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s=%0d state=%0d x=%b z=%b bufs=%0d %0d %0d", what, s, state, x, z,
               buf_state[0], buf_state[1], buf_state[2]);
    end
  endtask

  task automatic clear();
    rst = 1; @(negedge clk); rst = 0; s = 0;
  endtask

  task automatic load_image(input bit two_state, input bit inject_error);
    logic o;
    int nxt;
    for (int a = 0; a < 16; a++) begin
      nxt = two_state ? step2(a >> 1, a[0], o) : step5(a >> 1, a[0], o);
      we = 1; paddr = 4'(a); pdata = encode(nxt, o);
      if (inject_error) pdata[$urandom % 7] ^= 1'b1;
      @(negedge clk);
    end
    we = 0;
  endtask

  task automatic run(input int n, input bit two_state, input bit strict, input string what);
    logic o;
    int ns;
    bit disturbed = 0;
    for (int i = 0; i < n; i++) begin
      x = 1'($urandom);
      ns = two_state ? step2(s, x, o) : step5(s, x, o);
      #1;
      check(state == 3'(s) && z == o, what);
      if (strict) check(buf_state[0] == state && buf_state[1] == state && buf_state[2] == state
                        && syndrome == 0, {what, " (all lanes)"});
      if (syndrome != 0) corrected++;
      if (buf_state[0] != state || buf_state[1] != state || buf_state[2] != state) disturbed = 1;
      @(negedge clk);
      s = ns;
    end
    if (disturbed) masked++;
  endtask

  initial begin
    @(negedge clk); rst = 0; s = 0;
    run(150, 0, 1, "fault free");
    load_image(0, 1); clear();
    run(150, 0, 0, "single error in every word");
    check(corrected > 50, "decoders corrected memory errors");
    load_image(0, 0); clear();
    force dut.dec_next[1] = 3'b000; run(150, 0, 0, "decoder 1 stuck");
    release dut.dec_next[1]; clear();
    force dut.buf_state[2] = 3'b111; run(150, 0, 0, "buffer 2 stuck");
    release dut.buf_state[2]; clear();
    check(masked == 2, "both lane faults disturbed their lane");
    load_image(1, 0); clear();
    run(150, 1, 1, "reprogrammed two-state graph");
    $display("corrected reads: %0d", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
