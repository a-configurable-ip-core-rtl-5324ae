// tb_burst_ram: self-checking testbench of the burst buffer RAM.
//
// Fills all 1536 words with a pattern, then reads them back while writing a
// second pattern one burst ahead of the read address, as the core does
// (different addresses in the same cycle).  Checks the one-cycle read
// latency, that a read of an address written in the same cycle returns the
// old word, and that rdata holds when re is low.
module tb_burst_ram;
  localparam int DEPTH = 1536;
  localparam int DW = 12;
  localparam int AWD = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we, re;
  logic [AWD-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;

  burst_ram dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [DW-1:0] pat(input int a, input int k);
    return DW'(a * 37 + k * 1111 + 5);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (4 * DEPTH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we <= 1'b1; waddr <= AWD'(a); wdata <= pat(a, 0);
      @(posedge clk);
    end
    we <= 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      re <= 1'b1; raddr <= AWD'(a);
      we <= 1'b1; waddr <= AWD'((a + 512) % DEPTH); wdata <= pat((a + 512) % DEPTH, 1);
      @(posedge clk);
      #1;
      // the word read is the first pattern unless it was overwritten earlier
      check(rdata == ((a >= 512) ? pat(a, 1) : pat(a, 0)),
            $sformatf("addr %0d read %h", a, rdata));
    end
    // same-address read and write: old content comes out
    re <= 1'b1; raddr <= AWD'(7); we <= 1'b1; waddr <= AWD'(7); wdata <= 12'hABC;
    @(posedge clk);
    #1;
    check(rdata == pat(7, 1), "read-during-write did not return old word");
    re <= 1'b0; we <= 1'b0;
    @(posedge clk);
    #1;
    check(rdata == pat(7, 1), "rdata changed without re");
    re <= 1'b1; raddr <= AWD'(7);
    @(posedge clk);
    #1;
    check(rdata == 12'hABC, "write was lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
