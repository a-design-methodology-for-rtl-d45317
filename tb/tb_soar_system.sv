// tb_soar_system: end-to-end test of the SOAR system (core + clocks + fast
// shuffle) running a SOAR program from a behavioural memory.
//
// The testbench assembles a program with the encoders of soar_pkg into a
// 64K-word memory (address bits 15:0; the reset address 0x0FFFF0 aliases to
// 0xFFF0). The program sets up the trap base (TB), the saved-window pointer
// (SWP) and the PSW, then exercises: ALU operations with registers and
// immediates, result forwarding, load-data forwarding, loads and stores,
// pointer-to-register loads and stores, load-multiple and store-multiple,
// call/jmp through the fast-shuffle path, returns with the W, N and I
// options (nil filling), skip taken and not taken, conditional traps, tag
// traps, the generation-scavenging store check, software interrupt, window
// overflow and underflow, instruction and data page faults, an I/O
// interrupt, an illegal opcode, special register reads, and WAIT stalls
// injected at pseudo-random cycles throughout. Trap handlers log the reason
// to memory and return (re-executing or skipping the trapped instruction).
//
// Checks: every result the program stores is compared with its expected
// value, the trap log order is checked, cycle-level timing is checked
// (a call/jmp target is on the address pins in the call's execute cycle,
// a load/store is followed by exactly one data cycle), and every mechanism
// counter must be non-zero at the end. Memory-mapped addresses: 0xF000
// I/O acknowledge, 0xF001 MMU control (1 maps the code page 0x300, 2 the
// data page 0x8A00), 0xF002 arms the I/O interrupt, 0xF00F ends the run.
module tb_soar_system;
  import soar_pkg::*;

  logic        mclk = 1'b0;
  logic        reset_in = 1'b1;
  logic        wait_in = 1'b0;
  logic        ioint_in = 1'b0;
  logic        pagef_in;
  logic [31:0] mem_rdata;
  logic [27:0] mem_addr, pc;
  logic [31:0] mem_wdata;
  logic        rd_wr, i_d, fshcntl, wait_ack, phi1, phi1p, phi2, phi2p, phi3, phi3p, cycle_end;
  logic [2:0]  cwp;
  logic [1:0]  psw;
  logic        trap;
  logic [3:0]  trap_reason;

  soar_system dut (.*);

  always #5 mclk = ~mclk;

  logic [31:0] mem [65536];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ memory map
  localparam int MAIN = 'h0100, F1 = 'h0200, F2 = 'h0240, F3 = 'h0280;
  localparam int PAGED_CODE = 'h0300, BACK = 'h0180;
  localparam int HANDLERS = 'h0500, VEC = 'h4000;
  localparam int RES = 'h8000, LOG = 'h8100, STK = 'h8200, PAGED_DATA = 'h8A00;
  localparam int IO_ACK = 'hF000, MMU_CTL = 'hF001, IO_ARM = 'hF002, DONE = 'hF00F;

  bit code_mapped = 0, data_mapped = 0;
  assign pagef_in = (i_d && !code_mapped && mem_addr[27:8] == 20'(PAGED_CODE >> 8)) ||
                    (!i_d && !data_mapped && mem_addr[27:8] == 20'(PAGED_DATA >> 8));
  assign mem_rdata = mem[mem_addr[15:0]];

  // ------------------------------------------------------------ assembler
  int ap;
  function automatic void emit(input logic [31:0] w);
    mem[ap[15:0]] = w;
    ap++;
  endfunction
  function automatic void op3(opc_t op, int d, int s1, int s2);
    emit(enc_rrr(op, 1'b0, 5'(d), 5'(s1), 5'(s2)));
  endfunction
  function automatic void opi(opc_t op, int d, int s1, int imm);
    emit(enc_rri(op, 1'b0, 5'(d), 5'(s1), 12'(imm)));
  endfunction
  function automatic void st(int data_r, int base, int imm);
    emit(enc_store(OP_STORE, 1'b0, 5'(data_r), 5'(base), 12'(imm)));
  endfunction
  function automatic void call(int target);
    emit(enc_call(1'b0, 1'b0, 28'(target)));
  endfunction
  function automatic void jmp(int target);
    emit(enc_call(1'b1, 1'b0, 28'(target)));
  endfunction
  function automatic void ret(int opt, int s1, int imm);
    emit(enc_rri(opc_t'(int'(OP_RET0) + opt), 1'b0, 5'd0, 5'(s1), 12'(imm)));
  endfunction
  function automatic void nop();
    op3(OP_ADD, 16, 16, 16);
  endfunction
  // log the value of register r at the trap log pointer (global r25)
  function automatic void logreg(int r);
    st(r, 25, 0);
    opi(OP_ADD, 25, 25, 1);
  endfunction

  // registers: 16 zero, 17 PC, 18 SHB, 19 SHA, 20 SWP, 21 TB, 22 CWP, 23 PSW
  // globals: 24 result base, 25 log pointer, 26/27 handler scratch
  localparam int K_SWP = 1, K_TB = 2, K_SWP_OVF = 3, K_SWP_UNF = 4, K_VAL = 5,
                 K_OOP = 7, K_RES = 8, K_PTR = 10, K_LOG = 11, K_PDATA = 12,
                 K_CTX = 13, K_STK = 14;
  localparam logic [31:0] VAL = 32'h1234_5678, OOP = 32'h8000_0010;

  int res_n;            // next result slot
  logic [31:0] expect_res [256];
  bit          expect_set [256];
  function automatic void put_res(int r, logic [31:0] v);
    st(r, 24, res_n);
    expect_res[res_n] = v;
    expect_set[res_n] = 1'b1;
    res_n++;
  endfunction

  int pc_read_addr;

  function automatic void handler(trap_reason_e why, int back, bit log_shadow);
    ap = HANDLERS + int'(why) * 16;
    opi(OP_ADD, 26, 16, int'(why));
    logreg(26);
    if (log_shadow) begin
      op3(OP_ADD, 26, int'(R_SHA), 16); logreg(26);
      op3(OP_ADD, 26, int'(R_PSW), 16); logreg(26);
    end
    ret(4, 7, back);                       // ret with I: re-enable interrupts
  endfunction

  function automatic void build();
    for (int i = 0; i < 65536; i++) mem[i] = 32'd0;
    // constants reached with a zero base register
    mem[K_SWP] = 32'h0000_9000;  mem[K_TB] = 32'h0000_4000;
    mem[K_SWP_OVF] = 32'h0000_9060; mem[K_SWP_UNF] = 32'h0000_9070;
    mem[K_VAL] = VAL; mem[K_OOP] = OOP; mem[K_RES] = RES; mem[K_PTR] = 32'h8FE8;
    mem[K_LOG] = LOG; mem[K_PDATA] = PAGED_DATA; mem[K_CTX] = 32'hF000_0000;
    mem[K_STK] = STK;
    for (int i = 0; i < 8; i++) mem[STK + i] = 32'h100 + i;
    mem[PAGED_DATA] = 32'hCAFE_0001;
    // reset entry
    ap = 'hFFF0; jmp(MAIN);
    // trap vectors: every opcode slot of a reason jumps to its handler
    for (int r = 0; r < 10; r++)
      for (int o = 0; o < 64; o++) begin
        ap = VEC + r * 64 + o; jmp(HANDLERS + r * 16);
      end
    handler(TR_ILLEGAL, 0, 0);
    handler(TR_TAG, 0, 1);
    handler(TR_SWI, 0, 0);
    handler(TR_TRAPINSTR, 0, 0);
    handler(TR_GS, 0, 0);
    // window overflow/underflow: move the window boundary, re-execute
    ap = HANDLERS + int'(TR_WOVERFLOW) * 16;
    opi(OP_ADD, 26, 16, int'(TR_WOVERFLOW)); logreg(26);
    opi(OP_LOAD, 26, 16, K_SWP); op3(OP_ADD, int'(R_SWP), 26, 16);
    ret(4, 7, 'hFFF);
    ap = HANDLERS + int'(TR_WUNDERFLOW) * 16;
    opi(OP_ADD, 26, 16, int'(TR_WUNDERFLOW)); logreg(26);
    opi(OP_LOAD, 26, 16, K_SWP); op3(OP_ADD, int'(R_SWP), 26, 16);
    ret(4, 7, 'hFFF);
    // page faults: ask the MMU to map the page, re-execute
    ap = HANDLERS + int'(TR_IPAGEF) * 16;
    opi(OP_ADD, 26, 16, int'(TR_IPAGEF)); logreg(26);
    opi(OP_ADD, 27, 16, 1); st(26, 16, 0);   // placeholder, patched below
    ret(4, 7, 'hFFF);
    ap = HANDLERS + int'(TR_IPAGEF) * 16 + 3;
    opi(OP_LOAD, 27, 16, 15); st(26, 27, 0);  // mem[15] = MMU_CTL, data 8 -> map code
    ret(4, 7, 'hFFF);
    ap = HANDLERS + int'(TR_DPAGEF) * 16;
    opi(OP_ADD, 26, 16, int'(TR_DPAGEF)); logreg(26);
    opi(OP_LOAD, 27, 16, 15); st(26, 27, 0);  // data 5 -> map data
    ret(4, 7, 'hFFF);
    ap = HANDLERS + int'(TR_IOREQ) * 16;
    opi(OP_ADD, 26, 16, int'(TR_IOREQ)); logreg(26);
    opi(OP_LOAD, 27, 16, 16); st(26, 27, 0);  // mem[16] = IO_ACK
    ret(4, 7, 'hFFF);
    mem[15] = MMU_CTL; mem[16] = IO_ACK; mem[17] = IO_ARM; mem[18] = DONE;

    // ---------------------------------------------------------- main
    res_n = 0;
    ap = MAIN;
    opi(OP_LOAD, 24, 16, K_RES);
    opi(OP_LOAD, 25, 16, K_LOG);
    opi(OP_LOAD, 1, 16, K_TB);
    op3(OP_ADD, int'(R_TB), 1, 16);                // load-data forwarding
    opi(OP_LOAD, 2, 16, K_SWP);
    op3(OP_ADD, int'(R_SWP), 2, 16);
    opi(OP_ADD, int'(R_PSW), 16, 'h40);            // enable interrupts
    // ALU
    opi(OP_LOAD, 3, 16, K_VAL);
    opi(OP_ADD, 4, 3, 5);                    // forwarded from the load
    op3(OP_SUB, 5, 4, 3);                    // forwarded from the ALU
    op3(OP_XOR, 6, 3, 4);
    put_res(4, VAL + 5);
    put_res(5, 32'd5);
    put_res(6, VAL ^ (VAL + 5));
    op3(OP_AND, 8, 3, 4);  put_res(8, VAL & (VAL + 5));
    op3(OP_OR, 9, 3, 5);   put_res(9, VAL | 32'd5);
    op3(OP_SRL, 10, 3, 16); put_res(10, VAL >> 1);
    opi(OP_ADD, 11, 16, 'hFF0);              // -16, tag bits 1111
    op3(OP_SRA, 12, 11, 16); put_res(12, 32'hFFFF_FFF8);
    op3(OP_SLL, 13, 3, 3); put_res(13, VAL << 1);
    opi(OP_EXTRACT, 14, 3, 1); put_res(14, 32'h56);
    opi(OP_INSERT, 15, 3, 2); put_res(15, 32'h0078_0000);
    opi(OP_SUB, 28, 3, 8); put_res(28, VAL - 8);
    // special registers
    pc_read_addr = ap;
    op3(OP_ADD, 1, int'(R_PC), 16); put_res(1, 32'(pc_read_addr + 1));
    op3(OP_ADD, 2, int'(R_CWP), 16); put_res(2, 32'h70);
    op3(OP_ADD, 1, int'(R_TB), 16); put_res(1, 32'h4000);
    // skip taken (squashes the next instruction) and not taken
    op3(OP_ADD, 28, 16, 16);
    op3(OP_ADD, 29, 16, 16);
    op3(OP_SKIP, 'o04, 3, 3);               // EQ: taken
    opi(OP_ADD, 28, 16, 1);                  //   squashed
    opi(OP_ADD, 29, 16, 2);
    op3(OP_SKIP, 'o05, 3, 3);               // NE: not taken
    opi(OP_ADD, 30, 16, 3);
    put_res(28, 0); put_res(29, 2); put_res(30, 3);
    // conditional traps
    op3(opc_t'(int'(OP_TRAP1) + 1), 'o07, 16, 3); // trap if 0 > VAL: not taken
    op3(opc_t'(int'(OP_TRAP1) + 1), 'o02, 16, 3); // trap if 0 < VAL: taken
    // pointer to register: 0x8FE8+k is register k of this window
    opi(OP_LOAD, 28, 16, K_PTR);
    st(3, 28, 2);                            // r2 <- r3 through the pointer
    put_res(2, VAL);
    opi(OP_LOAD, 1, 28, 4);                  // r1 <- r4 through the pointer
    put_res(1, VAL + 5);
    // store multiple / load multiple
    opi(OP_LOAD, 29, 16, K_STK);
    opi(OP_ADD, 0, 16, 'h10); opi(OP_ADD, 1, 16, 'h11);
    opi(OP_ADD, 2, 16, 'h12); opi(OP_ADD, 3, 16, 'h13);
    emit(enc_store(OP_STOREM, 1'b0, 5'd3, 5'd29, 12'd1));  // r3..r0 to STK-1..STK-4
    emit(enc_rri(OP_LOADM, 1'b0, 5'd4, 5'd29, 12'd1));     // r4..r1 from STK-1 down
    put_res(4, 32'h13); put_res(3, 32'h12); put_res(2, 32'h11); put_res(1, 32'h10);
    // calls: arguments in r0..r7 are the callee's r8..r15
    opi(OP_ADD, 3, 16, 'h33);
    call(F1);
    put_res(3, 32'h34);                      // callee wrote its r11
    call(F2);                                // second call into the same window
    // window overflow on the next call, underflow on its return
    opi(OP_LOAD, 26, 16, K_SWP_OVF); op3(OP_ADD, int'(R_SWP), 26, 16);
    nop();                                   // special registers change a cycle later
    call(F3);
    put_res(5, 32'h55);
    // tag trap on a tagged add with an object pointer operand
    opi(OP_LOAD, 6, 16, K_OOP);
    emit(enc_rrr(OP_ADD, 1'b1, 5'd9, 5'd6, 5'd3));
    // generation scavenging: storing a context into an object
    opi(OP_LOAD, 8, 16, K_CTX);
    emit(enc_store(OP_STORE, 1'b1, 5'd8, 5'd6, 12'd0));
    // software interrupt: call with the SI bit while PSW<0> is set
    opi(OP_ADD, int'(R_PSW), 16, 'h60);
    nop();
    emit(enc_call(1'b0, 1'b1, 28'(F1)));
    opi(OP_ADD, int'(R_PSW), 16, 'h40);
    // illegal opcode
    emit(32'h8000_0000);
    // I/O interrupt, requested through a store to IO_ARM
    opi(OP_LOAD, 27, 16, 17); st(16, 27, 0);
    for (int i = 0; i < 6; i++) opi(OP_ADD, 9, 9, 1);
    // instruction page fault
    jmp(PAGED_CODE);
    // BACK: data page fault
    ap = BACK;
    opi(OP_LOAD, 28, 16, K_PDATA);
    opi(OP_LOAD, 9, 28, 0);
    put_res(9, 32'hCAFE_0001);
    op3(OP_ADD, 1, int'(R_CWP), 16); put_res(1, 32'h70);
    put_res(25, 32'(LOG + 12));              // log length (tag trap logs 3 words)
    opi(OP_LOAD, 27, 16, 18); st(16, 27, 0); // DONE
    jmp(ap);
    ap = PAGED_CODE;
    opi(OP_ADD, 1, 16, 'h21);
    put_res(1, 32'h21);
    jmp(BACK);

    // F1: increments its argument, leaves values in its lows, returns with
    // W and N (nil registers 0..5 of its window)
    ap = F1;
    opi(OP_ADD, 11, 11, 1);
    for (int i = 0; i < 7; i++) opi(OP_ADD, i, 16, 'h40 + i);
    ret(3, 15, 0);
    // F2: reads its lows left over by F1 through the same window
    ap = F2;
    for (int i = 0; i < 7; i++) st(i, 24, 'h40 + i);
    ret(1, 15, 0);
    // F3: entered through a window overflow; forces an underflow on return
    ap = F3;
    opi(OP_LOAD, 26, 16, K_SWP_UNF); op3(OP_ADD, int'(R_SWP), 26, 16);
    opi(OP_ADD, 13, 16, 'h55);               // caller's r5
    ret(1, 15, 0);
    for (int i = 0; i < 6; i++) begin
      expect_res['h40 + i] = 32'hB000_0000; expect_set['h40 + i] = 1'b1;
    end
    expect_res['h46] = 32'h46; expect_set['h46] = 1'b1;
  endfunction

  // expected trap log
  logic [31:0] exp_log [$];

  // ------------------------------------------------------- mechanism counts
  int n_stall, n_fwd, n_ldfwd, n_skip, n_fsh, n_nil, n_ptr, n_multi, n_call, n_ret,
      n_special, n_data_cycles, n_cycles;
  int n_trap [16];

  logic prev_mem_op, prev_call;
  logic [27:0] prev_target;
  logic done = 0;

  always @(posedge mclk) begin
    if (cycle_end && !reset_in) begin
      n_cycles++;
      if (dut.u_core.wait_q) n_stall++;
      else begin
        // timing checks on the cycle that is ending
        if (prev_call) check(mem_addr == prev_target && i_d, "call/jmp target fetched in its execute cycle");
        if (prev_mem_op) check(!i_d, "load/store followed by a data cycle");
        if (!i_d) n_data_cycles++;
        prev_call   = (dut.u_core.c1.is_call || dut.u_core.c1.is_jmp) && !dut.u_core.skip_q;
        prev_target = 28'(dut.u_core.dil[27:0]);
        if (prev_call) begin
          // the call is in execute now; its target is on the pins now
          check(mem_addr == prev_target, "fast shuffle address");
          prev_call = 0;
        end
        prev_mem_op = (dut.u_core.c1.cpipe1_loadc || dut.u_core.c1.cpipe1_store ||
                       dut.u_core.c1.cpipe1_loadm || dut.u_core.c1.cpipe1_storem) &&
                      !dut.u_core.trap_fire;
        if (dut.u_core.fwd_a || dut.u_core.fwd_b) begin
          if (dut.u_core.c2.opc2_load) n_ldfwd++; else n_fwd++;
        end
        if (dut.u_core.skip_fire) n_skip++;
        if (!fshcntl) n_fsh++;
        if (dut.u_core.c2.nil_on_return) n_nil++;
        if (dut.u_core.decode_ea_q && dut.u_core.ptr_to_reg) n_ptr++;
        if (dut.u_core.c1.src2_min || dut.u_core.c1.dst1_min) n_multi++;
        if (dut.u_core.c1.is_call) n_call++;
        if (dut.u_core.c1.tag_ret) n_ret++;
        if (!dut.u_core.azero && dut.u_core.src1s inside {[5'd17:5'd23]}) n_special++;
        if (trap) n_trap[trap_reason]++;
        // memory writes and memory-mapped devices
        if (!rd_wr && !pagef_in) begin
          mem[mem_addr[15:0]] <= mem_wdata;
          if (mem_addr == 28'(IO_ACK)) ioint_in <= 1'b0;
          if (mem_addr == 28'(IO_ARM)) ioint_in <= 1'b1;
          if (mem_addr == 28'(MMU_CTL) && mem_wdata == 32'(TR_IPAGEF)) code_mapped <= 1;
          if (mem_addr == 28'(MMU_CTL) && mem_wdata == 32'(TR_DPAGEF)) data_mapped <= 1;
          if (mem_addr == 28'(DONE)) done <= 1;
        end
      end
      // WAIT requests at pseudo-random cycles
      wait_in <= ($urandom_range(0, 15) == 0);
    end
  end

  initial begin
    #2_000_000;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    n_stall = 0; n_fwd = 0; n_ldfwd = 0; n_skip = 0; n_fsh = 0; n_nil = 0; n_ptr = 0;
    n_multi = 0; n_call = 0; n_ret = 0; n_special = 0; n_data_cycles = 0; n_cycles = 0;
    prev_mem_op = 0; prev_call = 0; prev_target = '0;
    for (int i = 0; i < 16; i++) n_trap[i] = 0;
    for (int i = 0; i < 256; i++) begin expect_res[i] = 0; expect_set[i] = 0; end
    build();
    repeat (30) @(posedge mclk);
    reset_in = 1'b0;
    wait (done);
    repeat (12) @(posedge mclk);
    // results
    for (int i = 0; i < 256; i++)
      if (expect_set[i])
        check(mem[RES + i] === expect_res[i],
              $sformatf("result %0d = %08h, expected %08h", i, mem[RES + i], expect_res[i]));
    // trap log
    exp_log = '{32'(TR_TRAPINSTR), 32'(TR_WOVERFLOW), 32'(TR_WUNDERFLOW), 32'(TR_TAG),
                OOP, 32'h0000_0000, 32'(TR_GS), 32'(TR_SWI), 32'(TR_ILLEGAL), 32'(TR_IOREQ),
                32'(TR_IPAGEF), 32'(TR_DPAGEF)};
    foreach (exp_log[i]) begin
      if (i == 5) begin
        // PSW word: shadow opcode = tagged add, interrupts were enabled
        check(mem[LOG + i][15:8] == {1'b1, 1'b1, OP_ADD[5:0]} &&
              mem[LOG + i][4:0] == 5'd9,
              $sformatf("shadow opcode/destination %08h", mem[LOG + i]));
      end else
        check(mem[LOG + i] === exp_log[i],
              $sformatf("trap log %0d = %08h, expected %08h", i, mem[LOG + i], exp_log[i]));
    end
    // every mechanism must have happened
    check(n_stall > 0, "WAIT stall");
    check(n_fwd > 0, "ALU result forwarding");
    check(n_ldfwd > 0, "load data forwarding");
    check(n_skip > 0, "skip");
    check(n_fsh > 0, "fast shuffle");
    check(n_nil > 0, "nil on return");
    check(n_ptr > 0, "pointer to register");
    check(n_multi > 0, "load/store multiple");
    check(n_call > 0, "call");
    check(n_ret > 0, "return");
    check(n_special > 0, "special register read");
    check(n_data_cycles > 0, "data cycles");
    for (int r = 0; r < 10; r++)
      check(n_trap[r] > 0, $sformatf("trap reason %0d", r));
    $display("cycles=%0d stalls=%0d fwd=%0d ldfwd=%0d skip=%0d fsh=%0d nil=%0d ptr=%0d multi=%0d calls=%0d rets=%0d special=%0d",
             n_cycles, n_stall, n_fwd, n_ldfwd, n_skip, n_fsh, n_nil, n_ptr, n_multi, n_call, n_ret, n_special);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
