// tb_peanut_memory: self-checking test of the 1024 x 16 memory.
// Writes every cell with a known pattern, reads them all back, then runs
// random reads and writes against a reference array. Also checks that a
// read without Enable returns 0 and that rw = 1 (Read) never stores.
module tb_peanut_memory;
  localparam int unsigned AW = 10, DW = 16, CELLS = 1024;
  logic          clk = 0;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata;
  logic          rw, en;
  logic [DW-1:0] ref_mem [CELLS];
  int checks = 0, failures = 0;

  peanut_memory #(.AW(AW), .DW(DW)) dut (.clk, .addr, .wdata, .rdata, .rw, .en);

  always #5 clk = ~clk;

  task automatic write(input int a, input logic [DW-1:0] d);
    @(negedge clk);
    addr = AW'(a); wdata = d; rw = 1'b0; en = 1'b1;
    @(negedge clk);
    en = 1'b0; rw = 1'b1;
    ref_mem[a] = d;
  endtask

  task automatic read_check(input int a);
    @(negedge clk);
    addr = AW'(a); rw = 1'b1; en = 1'b1;
    #1;
    checks++;
    if (rdata !== ref_mem[a]) begin
      failures++;
      $display("FAIL read [%0d] = %h expected %h", a, rdata, ref_mem[a]);
    end
    en = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; rw = 1; addr = 0; wdata = 0;
    for (int a = 0; a < CELLS; a++) write(a, DW'(a * 37 + 16'h5a00));
    for (int a = 0; a < CELLS; a++) read_check(a);
    // Read with rw = 1 must not store wdata.
    @(negedge clk);
    addr = 10'd100; wdata = ~ref_mem[100]; rw = 1'b1; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    read_check(100);
    // Not enabled: data lines read 0; a write without Enable stores nothing.
    @(negedge clk);
    addr = 10'd7; rw = 1'b1; en = 1'b0; #1;
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL rdata not 0 while disabled"); end
    rw = 1'b0; wdata = ~ref_mem[7];
    @(negedge clk);
    rw = 1'b1;
    read_check(7);
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = int'($urandom_range(CELLS - 1));
      if ($urandom_range(1)) write(a, DW'($urandom));
      else read_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
