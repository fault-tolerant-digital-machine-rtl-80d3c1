// prom_tb: checks the reprogrammable memory model. With a 16 x 7 image
// (word i = 3*i + 5, truncated) every word must read back; then every word
// is reprogrammed with random data through the programming port, one per
// clock, and read back; reads must be combinational (no clock between a new
// address and its data).
module prom_tb;
  localparam int W = 7;
  function automatic logic [15:0][W-1:0] image();
    logic [15:0][W-1:0] img;
    for (int i = 0; i < 16; i++) img[i] = W'(3 * i + 5);
    return img;
  endfunction

  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [3:0] addr = 0, paddr = 0;
  logic [W-1:0] data, pdata = 0;
  logic [W-1:0] shadow [16];

  prom #(.WORDS(16), .WIDTH(W), .INIT(image())) dut (
    .clk(clk), .addr(addr), .data(data), .prog_we(we), .prog_addr(paddr), .prog_data(pdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: addr=%0d data=%h", what, addr, data);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i); #1;
      check(data == W'(3 * i + 5), "initial image");
    end
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      we = 1; paddr = 4'(i); pdata = W'($urandom); shadow[i] = pdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 15; i >= 0; i--) begin
      addr = 4'(i); #1;
      check(data == shadow[i], "reprogrammed word");
    end
    // write disabled: no change
    paddr = 4'd3; pdata = ~shadow[3]; @(negedge clk);
    addr = 4'd3; #1 check(data == shadow[3], "no write without prog_we");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
