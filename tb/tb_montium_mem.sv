// Self-checking testbench of montium_mem: random simultaneous writes and
// reads compared with a model array, including read-during-write of the
// same address (old data expected) and the one-cycle read latency.
module tb_montium_mem;
  localparam int W = 16, D = 1024;
  logic clk = 0;
  logic we, re;
  logic [9:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  montium_mem #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    logic pend;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; pend = 0; exp = 0;
    // fill
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 10'(i); wdata = W'($urandom); model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 5000; n++) begin
      we = ($urandom % 2) == 1;
      re = ($urandom % 3) != 0;
      waddr = 10'($urandom);
      raddr = (n % 5 == 0) ? waddr : 10'($urandom);
      wdata = W'($urandom);
      if (re) exp = model[raddr];
      pend = re;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      if (pend) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d: got %h exp %h", n, rdata, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
