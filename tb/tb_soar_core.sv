// tb_soar_core: cycle-exact test of the processor core on its own, with the
// clock enable high every cycle, a behavioural memory and a behavioural
// model of the external fast-shuffle latch. A short program (jump from the
// reset address, load, dependent add, store, call, callee write into the
// caller's register, return with window increment, store, end marker) is
// run once (after clearing SWP, which reset leaves alone), and the testbench checks the stored results, the final CWP,
// and the exact machine cycle on which each memory data cycle happens:
// one cycle per instruction, one extra data cycle per load/store, no
// penalty for call, one flushed cycle after a return. Cycle 0 is the first
// cycle after reset (the reset address is being fetched).
module tb_soar_core;
  import soar_pkg::*;
  logic clk = 0, en, reset_in, wait_in, ioint_in, pagef_in;
  logic [31:0] data_in, data_out;
  logic [27:0] mal_o, pc_o, ext_mal, addr;
  logic rd_wr, i_d, fshcntl, wait_q, wait_ack, trap_o;
  logic [2:0] cwp_o;
  logic [1:0] psw_o;
  logic [3:0] trap_reason_o;
  logic [31:0] mem [256];
  int checks = 0, failures = 0, cyc;
  int write_cycles [$];

  soar_core dut (.*);
  always #5 clk = ~clk;

  assign addr = fshcntl ? mal_o : ext_mal;
  assign data_in = mem[addr[7:0]];

  always_ff @(posedge clk) begin
    if (reset_in) ext_mal <= '0;
    else if (i_d) ext_mal <= data_in[27:0];
    if (!reset_in && !rd_wr) mem[addr[7:0]] <= data_out;
  end

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 0;
    mem[8'hF0] = enc_call(1'b1, 1'b0, 28'h0F);                 // reset address 0x0FFFF0
    mem[8'h0F] = enc_rri(OP_ADD, 1'b0, 5'd20, 5'd16, 12'd0);   // SWP <- 0 (not reset)
    mem[1]     = 32'd7;
    mem[8'h10] = enc_rri(OP_LOAD, 1'b0, 5'd1, 5'd16, 12'd1);
    mem[8'h11] = enc_rri(OP_ADD, 1'b0, 5'd2, 5'd1, 12'd3);
    mem[8'h12] = enc_store(OP_STORE, 1'b0, 5'd2, 5'd16, 12'h40);
    mem[8'h13] = enc_call(1'b0, 1'b0, 28'h20);
    mem[8'h14] = enc_store(OP_STORE, 1'b0, 5'd3, 5'd16, 12'h41);
    mem[8'h15] = enc_store(OP_STORE, 1'b0, 5'd7, 5'd16, 12'h42);
    mem[8'h16] = enc_call(1'b1, 1'b0, 28'h16);
    mem[8'h20] = enc_rri(OP_ADD, 1'b0, 5'd11, 5'd16, 12'h19);
    mem[8'h21] = enc_rri(opc_t'(int'(OP_RET0) + 1), 1'b0, 5'd0, 5'd15, 12'd0);
    en = 1; reset_in = 1; wait_in = 0; ioint_in = 0; pagef_in = 0;
    repeat (3) @(posedge clk);
    #1 reset_in = 0;
    @(posedge clk);                         // reset leaves the core at the end of this edge
    for (cyc = 0; cyc < 40; cyc++) begin
      #1;
      if (!rd_wr) write_cycles.push_back(cyc);
      @(posedge clk);
    end
    expect_true(mem[8'h40] == 32'd10, $sformatf("load + add stored %0d", mem[8'h40]));
    expect_true(mem[8'h41] == 32'h19, $sformatf("callee result %08h", mem[8'h41]));
    expect_true(mem[8'h42] == 32'h14, $sformatf("return address in r7 %08h", mem[8'h42]));
    expect_true(cwp_o == 3'd7, "CWP back to 7 after call and return");
    expect_true(write_cycles.size() == 3, $sformatf("%0d store cycles", write_cycles.size()));
    if (write_cycles.size() == 3)
      expect_true(write_cycles[0] == 7 && write_cycles[1] == 13 && write_cycles[2] == 15,
                  $sformatf("store data cycles at %0d %0d %0d, expected 7 13 15",
                            write_cycles[0], write_cycles[1], write_cycles[2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
