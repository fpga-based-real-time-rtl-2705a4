// tb_line_buffer: self-checking test of the one-line memory.
// Writes two random lines, checks that each read returns the word written at
// that column one line earlier (read-before-write at the same address) with a
// one-clock read latency, and that a disabled read holds its output.
module tb_line_buffer;
  localparam int W = 12, D = 40;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         we, re;
  logic [5:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] line0 [D], line1 [D];

  line_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    foreach (line0[i]) begin line0[i] = W'($urandom); line1[i] = W'($urandom); end
    // First line: write only.
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = line0[i];
    end
    // Second line: read and write the same column in the same clock.
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; re = 1; waddr = 6'(i); raddr = 6'(i); wdata = line1[i];
      @(posedge clk); #1;
      check(rdata == line0[i], $sformatf("read-before-write col %0d: %h vs %h", i, rdata, line0[i]));
    end
    @(negedge clk); we = 0; re = 1; raddr = 6'd7;
    @(posedge clk); #1;
    check(rdata == line1[7], "second line readback");
    @(negedge clk); re = 0; raddr = 6'd9;
    @(posedge clk); #1;
    check(rdata == line1[7], "output held while read disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
