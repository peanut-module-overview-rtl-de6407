// tb_peanut_cpu: self-checking test of the CPU against an instruction-level
// reference model.
// The testbench holds its own 1024-word memory (combinational read, as the
// PeANUt memory behaves) filled with a random mix of LOAD instructions in
// immediate, direct and indirect mode, other opcodes and other modes. The CPU
// runs from PC = 0 through more than one wrap of the address space. After
// every instruction the testbench compares AC, PC and CI with the reference
// model and the instruction's cycle count with 6 / 8 / 10 cycles (LOAD
// immediate / direct / indirect) or 5 (skipped instruction). It also checks
// that the CPU never issues a memory write.
module tb_peanut_cpu;
  import peanut_pkg::*;

  localparam int unsigned CELLS = 1024;
  localparam int unsigned NINSTR = 1500;

  logic  clk = 0, rst_n = 0, run = 0;
  addr_t mem_addr;
  word_t mem_wdata, mem_rdata;
  logic  mem_rw, mem_en;
  regs_t regs;
  logic  instr_done, unimpl;
  word_t mem [CELLS];
  int checks = 0, failures = 0;

  peanut_cpu dut (.clk, .rst_n, .run, .mem_addr, .mem_wdata, .mem_rdata,
                  .mem_rw, .mem_en, .regs, .instr_done, .unimpl);

  assign mem_rdata = (mem_en && mem_rw) ? mem[mem_addr] : '0;

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && mem_en && !mem_rw) begin
    failures++;
    $display("FAIL CPU issued a memory write");
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (NINSTR * 12 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc, cycles, exp_cycles;
    int n_kind [4];
    word_t w, exp_ac;
    logic [2:0] mode, op;
    int opspec;
    for (int a = 0; a < CELLS; a++) begin
      int k;
      k = int'($urandom_range(9));
      mode = (k < 3) ? 3'(k) : 3'($urandom);
      op   = (k < 7) ? 3'b001 : 3'($urandom);
      mem[a] = {mode, op, 10'($urandom)};
    end
    n_kind = '{default: 0};
    exp_ac = '0;
    pc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(regs.psw.pc == 0 && regs.ac == 0 && regs.psw.cc == 0, "reset values");
    run = 1;
    for (int i = 0; i < NINSTR; i++) begin
      // reference model
      w = mem[pc];
      pc = (pc + 1) % CELLS;
      mode = w[15:13]; op = w[12:10]; opspec = int'(w[9:0]);
      if (op != 3'b001 || mode > 3'b010) begin
        exp_cycles = 5; n_kind[3]++;
      end else if (mode == 3'b000) begin
        exp_ac = {{6{w[9]}}, w[9:0]}; exp_cycles = 6; n_kind[0]++;
      end else if (mode == 3'b001) begin
        exp_ac = mem[opspec]; exp_cycles = 8; n_kind[1]++;
      end else begin
        exp_ac = mem[int'(mem[opspec][9:0])]; exp_cycles = 10; n_kind[2]++;
      end
      // run the CPU until the instruction ends
      cycles = 0;
      do begin
        @(posedge clk);
        cycles++;
      end while (!instr_done && cycles < 50);
      check(unimpl == (exp_cycles == 5), $sformatf("unimpl flag for %h", w));
      @(negedge clk);
      check(cycles == exp_cycles, $sformatf("instr %0d (%h): %0d cycles, expected %0d",
                                            i, w, cycles, exp_cycles));
      check(regs.ac == exp_ac, $sformatf("instr %0d (%h): AC=%h expected %h",
                                         i, w, regs.ac, exp_ac));
      check(int'(regs.psw.pc) == pc, $sformatf("instr %0d: PC=%0d expected %0d",
                                               i, regs.psw.pc, pc));
      check(regs.ci == w, $sformatf("instr %0d: CI=%h expected %h", i, regs.ci, w));
    end
    check(regs.sp == 0 && regs.xr == 0 && regs.psw.cc == 0, "SP, XR, CC untouched");
    check(n_kind[0] > 0 && n_kind[1] > 0 && n_kind[2] > 0 && n_kind[3] > 0,
          "every instruction kind ran");
    $display("immediate=%0d direct=%0d indirect=%0d skipped=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
