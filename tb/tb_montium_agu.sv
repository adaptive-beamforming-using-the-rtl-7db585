// Self-checking testbench of montium_agu: runs linear, stride-by-n,
// modulo and bit-reverse sequences and compares each address with the
// pattern computed here.
module tb_montium_agu;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic [1:0] mode;
  logic [AW-1:0] base, stride, addr;
  logic [AW:0] modulus;
  logic [3:0] rev_bits;
  logic load, step;
  int checks = 0, failures = 0;

  montium_agu #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [1:0] m, input int bs, input int st, input int md, input int rb, input int n);
    int off;
    logic [AW-1:0] exp, r;
    mode = m; base = AW'(bs); stride = AW'(st); modulus = (AW+1)'(md); rev_bits = 4'(rb);
    load = 1; step = 0;
    @(posedge clk); #1;
    load = 0;
    off = 0;
    for (int i = 0; i < n; i++) begin
      case (m)
        2'd0: off = i;
        2'd1: off = i * st;
        2'd2: off = (i * st) % md;
        default: off = i;
      endcase
      r = AW'(off);
      if (m == 2'd3) for (int j = 0; j < rb; j++) r[j] = AW'(off) >> (rb - 1 - j);
      exp = AW'(bs + int'(r));
      checks++;
      if (addr !== exp) begin
        failures++;
        $display("FAIL mode %0d step %0d: addr %0d exp %0d", m, i, addr, exp);
      end
      step = 1;
      @(posedge clk); #1;
      step = 0;
      if (i % 3 == 2) begin @(posedge clk); #1; end  // idle cycle: address must hold
    end
  endtask

  initial begin
    load = 0; step = 0; mode = 0; base = 0; stride = 1; modulus = 0; rev_bits = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run(2'd0, 100, 1, 0, 0, 50);     // linear
    run(2'd1, 3, 7, 0, 0, 60);       // stride 7
    run(2'd2, 512, 3, 64, 0, 100);   // modulo 64, stride 3 (circular buffer)
    run(2'd2, 0, 1, 5, 0, 23);       // modulo 5
    run(2'd3, 0, 1, 0, 3, 8);        // 8-point bit reversal
    run(2'd3, 64, 1, 0, 6, 64);      // 64-point bit reversal
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
