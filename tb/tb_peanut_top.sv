// tb_peanut_top: end-to-end test of the PeANUt computer and the byte-order
// interpreter, at the top's default sizes (1024 x 16 memory).
//
// Phase 1 loads, through the load port, a program of LOAD #31 (immediate),
// LOAD a20 (direct, with 34 stored at octal address 20), LOAD #-5, a
// non-LOAD opcode and an indexed-mode LOAD (both skipped), and checks AC,
// CI and the cycle count after each instruction. Phase 2 reloads memory for
// LOAD a20 in indirect mode (cell 20 holds address 30, cell 30 holds 57).
// Phase 3 fills the whole memory with random instructions and runs 2000 of
// them against an instruction-level reference model. The byte-order
// interpreter is driven with 01 02 03 04 and random bytes in both orders.
// Each mechanism (immediate, direct and indirect operands, skipped
// instruction, load-port write, hold while run is low, both byte orders) is
// counted, and one that never happened counts as a failure.
module tb_peanut_top;
  import peanut_pkg::*;

  localparam int unsigned CELLS = 1024;

  logic        clk = 0, rst_n = 0, run = 0;
  logic        ld_en = 0;
  addr_t       ld_addr = '0;
  word_t       ld_data = '0;
  regs_t       regs;
  word_t       mdr;
  logic        instr_done, unimpl;
  logic [7:0]  bytes [4];
  logic        big_endian;
  logic [31:0] value;

  word_t model_mem [CELLS];
  int checks = 0, failures = 0;
  int n_imm = 0, n_dir = 0, n_ind = 0, n_skip = 0, n_load = 0, n_hold = 0;
  int n_be = 0, n_le = 0;

  peanut_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic load_word(input int a, input word_t d);
    @(negedge clk);
    ld_en = 1; ld_addr = addr_t'(a); ld_data = d;
    @(negedge clk);
    ld_en = 0;
    model_mem[a] = d;
    n_load++;
  endtask

  // Hold the CPU in reset with run low, then release reset; the CPU must
  // stay put until run is raised.
  task automatic restart();
    @(negedge clk);
    run = 0; rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    repeat (3) begin
      @(negedge clk);
      check(regs.psw.pc == 0 && mdr == 0, "CPU held while run is low");
      n_hold++;
    end
    run = 1;
  endtask

  // Run one instruction, check it against the reference model.
  task automatic step(inout int pc, inout word_t ac, input string tag);
    word_t w;
    logic [2:0] mode, op;
    int cycles, exp_cycles;
    w = model_mem[pc];
    pc = (pc + 1) % CELLS;
    mode = w[15:13]; op = w[12:10];
    if (op != OP_LOAD || mode > 3'b010) begin
      exp_cycles = 5; n_skip++;
    end else if (mode == 3'b000) begin
      ac = {{6{w[9]}}, w[9:0]}; exp_cycles = 6; n_imm++;
    end else if (mode == 3'b001) begin
      ac = model_mem[int'(w[9:0])]; exp_cycles = 8; n_dir++;
    end else begin
      ac = model_mem[int'(model_mem[int'(w[9:0])][9:0])]; exp_cycles = 10; n_ind++;
    end
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
    end while (!instr_done && cycles < 50);
    check(unimpl == (exp_cycles == 5), $sformatf("%s: skip flag for %h", tag, w));
    @(negedge clk);
    check(cycles == exp_cycles, $sformatf("%s: %h took %0d cycles, expected %0d",
                                          tag, w, cycles, exp_cycles));
    check(regs.ac == ac, $sformatf("%s: %h AC=%h expected %h", tag, w, regs.ac, ac));
    check(regs.ci == w, $sformatf("%s: CI=%h expected %h", tag, regs.ci, w));
    check(int'(regs.psw.pc) == pc, $sformatf("%s: PC=%0d expected %0d", tag, regs.psw.pc, pc));
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc;
    word_t ac;
    logic [31:0] be, le;

    // ---- byte-order interpreter
    bytes = '{8'h01, 8'h02, 8'h03, 8'h04};
    big_endian = 1; #1; check(value == 32'h01020304, "01 02 03 04 big-endian"); n_be++;
    big_endian = 0; #1; check(value == 32'h04030201, "01 02 03 04 little-endian"); n_le++;
    for (int i = 0; i < 50; i++) begin
      be = 0; le = 0;
      for (int k = 0; k < 4; k++) begin
        bytes[k] = 8'($urandom);
        be = (be << 8) | 32'(bytes[k]);
        le |= 32'(bytes[k]) << (8 * k);
      end
      big_endian = 1; #1; check(value == be, "random big-endian"); n_be++;
      big_endian = 0; #1; check(value == le, "random little-endian"); n_le++;
    end

    // ---- phase 1: immediate and direct LOAD, skipped instructions
    for (int a = 0; a < CELLS; a++) model_mem[a] = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    for (int a = 0; a < 64; a++) load_word(a, '0);
    load_word(0, 16'b000_001_0000011111);   // LOAD #31
    load_word(1, 16'b001_001_0000010000);   // LOAD a20 (direct)
    load_word(2, {6'b000_001, 10'(-5)});    // LOAD #-5
    load_word(3, 16'b000_010_0000000001);   // opcode 010: not decoded, skipped
    load_word(4, 16'b011_001_0000000011);   // indexed mode: skipped
    load_word(16, 16'd34);                  // a20 holds 34
    restart();
    pc = 0; ac = '0;
    step(pc, ac, "LOAD #31");
    check(regs.ac == 16'd31, "AC is 31 after LOAD #31");
    step(pc, ac, "LOAD a20");
    check(regs.ac == 16'd34, "AC is 34 after LOAD a20");
    check(regs.ci == 16'b0010_0100_0001_0000, "CI bit pattern of LOAD a20");
    step(pc, ac, "LOAD #-5");
    check(regs.ac == 16'hfffb, "AC is -5 after LOAD #-5");
    step(pc, ac, "opcode 010");
    step(pc, ac, "indexed mode");
    check(regs.ac == 16'hfffb, "AC unchanged by skipped instructions");

    // ---- phase 2: indirect LOAD
    @(negedge clk);
    run = 0;
    load_word(0, 16'b010_001_0000010000);   // LOAD a20 (indirect)
    load_word(16, 16'o30);                  // a20 holds a30
    load_word(24, 16'd57);                  // a30 holds 57
    restart();
    pc = 0; ac = '0;
    step(pc, ac, "LOAD (a20)");
    check(regs.ac == 16'd57, "AC is 57 after indirect LOAD a20");

    // ---- phase 3: random program over the whole memory
    @(negedge clk);
    run = 0;
    for (int a = 0; a < CELLS; a++) begin
      int k;
      logic [2:0] mode, op;
      k = int'($urandom_range(9));
      mode = (k < 3) ? 3'(k) : 3'($urandom);
      op   = (k < 7) ? 3'b001 : 3'($urandom);
      load_word(a, {mode, op, 10'($urandom)});
    end
    restart();
    pc = 0; ac = '0;
    for (int i = 0; i < 2000; i++) step(pc, ac, $sformatf("random %0d", i));

    $display("immediate=%0d direct=%0d indirect=%0d skipped=%0d loads=%0d holds=%0d big=%0d little=%0d",
             n_imm, n_dir, n_ind, n_skip, n_load, n_hold, n_be, n_le);
    check(n_imm > 0,  "immediate operand happened");
    check(n_dir > 0,  "direct operand happened");
    check(n_ind > 0,  "indirect operand happened");
    check(n_skip > 0, "skipped instruction happened");
    check(n_load > 0, "load-port write happened");
    check(n_hold > 0, "hold with run low happened");
    check(n_be > 0 && n_le > 0, "both byte orders happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
