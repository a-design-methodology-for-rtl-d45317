// soar_system: the SOAR processor chip plus its fast-shuffle address logic.
//
// Contents: the two-phase-to-three-phase clock generator (soar_clockgen),
// the processor core (soar_core: pipeline, control PLAs, register file,
// ALU, window/trap/tag logic) and the external call/jump address latch
// and mux (soar_fastshuffle). Memory is outside: the system presents a
// 28-bit word address (mem_addr), a read/write strobe (rd_wr, 1 = read),
// the instruction/data indicator (i_d, 1 = instruction fetch) and store
// data (mem_wdata), and expects the addressed word on mem_rdata before the
// end of the same machine cycle.
//
// Timing: mclk is the master clock; one machine cycle is six mclk ticks
// (phi1, phi1', phi2, phi2', phi3, phi3'); cycle_end marks the last tick,
// at which all processor state changes. Memory writes should be done on
// that tick when rd_wr is low. wait_in, ioint_in, pagef_in and reset_in
// are sampled at cycle_end. The six-tick cycle follows the document's
// clock description; sampling everything once per cycle is a choice of
// this model.
module soar_system (
  input  logic        mclk,
  input  logic        reset_in,
  input  logic        wait_in,
  input  logic        ioint_in,
  input  logic        pagef_in,
  input  logic [31:0] mem_rdata,
  output logic [27:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        rd_wr,
  output logic        i_d,
  output logic        fshcntl,
  output logic        wait_ack,
  output logic        phi1,
  output logic        phi1p,
  output logic        phi2,
  output logic        phi2p,
  output logic        phi3,
  output logic        phi3p,
  output logic        cycle_end,
  output logic [27:0] pc,
  output logic [2:0]  cwp,
  output logic [1:0]  psw,
  output logic        trap,
  output logic [3:0]  trap_reason
);

  logic [27:0] mal;
  logic        wait_q;

  soar_clockgen u_clk (
    .mclk(mclk), .rst(reset_in),
    .phi1(phi1), .phi1p(phi1p), .phi2(phi2), .phi2p(phi2p), .phi3(phi3), .phi3p(phi3p),
    .cycle_end(cycle_end)
  );

  soar_core u_core (
    .clk(mclk), .en(cycle_end),
    .reset_in(reset_in), .wait_in(wait_in), .ioint_in(ioint_in), .pagef_in(pagef_in),
    .data_in(mem_rdata),
    .mal_o(mal), .data_out(mem_wdata), .rd_wr(rd_wr), .i_d(i_d), .fshcntl(fshcntl),
    .wait_q(wait_q), .wait_ack(wait_ack),
    .pc_o(pc), .cwp_o(cwp), .psw_o(psw), .trap_o(trap), .trap_reason_o(trap_reason)
  );

  soar_fastshuffle u_fsh (
    .clk(mclk), .en(cycle_end), .rst(reset_in),
    .mal(mal), .data_in(mem_rdata[27:0]), .i_d(i_d), .wait_q(wait_q), .fshcntl(fshcntl),
    .addr(mem_addr)
  );

endmodule
