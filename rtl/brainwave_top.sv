// brainwave_top: the BrainWave processor, an always-on EEG processing SoC
// that pairs a RISC-V microcontroller with a coarse-grained reconfigurable
// array (CGRA) for energy-efficient signal-processing kernels.
//
// Inside: 80 kB of SRAM (32 kB RISC-V program memory, 32 kB shared data
// memory, 16 kB CGRA program memory), the interconnect, and the CGRA with
// its program loader / control interface and its global data interface.
// The RISC-V core itself, the peripherals (SPI, UART, PMU, timers, I2C,
// GPIO on an APB bus) and the JTAG programming port are not part of this
// RTL: the core's instruction and data ports (core_instr_*, core_data_*)
// and the peripheral bus (periph_*) are top-level ports.
//
// Address map (this design's choice):
//   0x0000_0000 RISC-V PMEM   0x0010_0000 shared DMEM
//   0x0020_0000 CGRA PMEM     0x0030_0000 CGRA control registers
//   0x1A10_0000 peripheral bus (outside)
// Interconnect masters: core instruction port, core data port, CGRA global
// data interface, CGRA instruction interface (program loader).
// cgra_irq pulses when a kernel halts; cgra_busy is high while it runs
// (the activity the chip shows on a GPIO pin).
module brainwave_top
  import bw_pkg::*;
#(
  parameter int unsigned PMEM_BYTES  = 32 * 1024,
  parameter int unsigned DMEM_BYTES  = 32 * 1024,
  parameter int unsigned CPMEM_BYTES = 16 * 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t core_instr_req,
  output bus_rsp_t core_instr_rsp,
  input  bus_req_t core_data_req,
  output bus_rsp_t core_data_rsp,
  output bus_req_t periph_req,
  input  bus_rsp_t periph_rsp,
  output logic     cgra_irq,
  output logic     cgra_busy
);
  localparam int unsigned NM = 4;
  localparam int unsigned NS = 5;
  localparam logic [31:0] DMEM_BASE = 32'h0010_0000;

  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  bus_req_t s_req [NS];
  bus_rsp_t s_rsp [NS];

  logic            cfg_we, im_we, start, running, done, stall;
  logic [4:0]      cfg_idx;
  fu_cfg_t         cfg_data;
  logic [3:0]      im_idx;
  logic [PC_W-1:0] im_addr;
  imm_instr_t      im_data;

  assign m_req[0]       = core_instr_req;
  assign core_instr_rsp = m_rsp[0];
  assign m_req[1]       = core_data_req;
  assign core_data_rsp  = m_rsp[1];

  bw_xbar #(.NM(NM), .NS(NS)) u_xbar (
    .clk  (clk),
    .rst_n(rst_n),
    .m_req(m_req),
    .m_rsp(m_rsp),
    .s_req(s_req),
    .s_rsp(s_rsp)
  );

  bw_sram #(.BYTES(PMEM_BYTES))  u_pmem  (.clk(clk), .rst_n(rst_n), .req(s_req[0]), .rsp(s_rsp[0]));
  bw_sram #(.BYTES(DMEM_BYTES))  u_dmem  (.clk(clk), .rst_n(rst_n), .req(s_req[1]), .rsp(s_rsp[1]));
  bw_sram #(.BYTES(CPMEM_BYTES)) u_cpmem (.clk(clk), .rst_n(rst_n), .req(s_req[2]), .rsp(s_rsp[2]));

  assign periph_req = s_req[4];
  assign s_rsp[4]   = periph_rsp;

  cgra_loader u_loader (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_req   (s_req[3]),
    .s_rsp   (s_rsp[3]),
    .m_req   (m_req[3]),
    .m_rsp   (m_rsp[3]),
    .cfg_we  (cfg_we),
    .cfg_idx (cfg_idx),
    .cfg_data(cfg_data),
    .im_we   (im_we),
    .im_idx  (im_idx),
    .im_addr (im_addr),
    .im_data (im_data),
    .start   (start),
    .running (running),
    .done    (done),
    .irq     (cgra_irq)
  );

  cgra_fabric #(.GMEM_BASE(DMEM_BASE)) u_cgra (
    .clk     (clk),
    .rst_n   (rst_n),
    .cfg_we  (cfg_we),
    .cfg_idx (cfg_idx),
    .cfg_data(cfg_data),
    .im_we   (im_we),
    .im_idx  (im_idx),
    .im_addr (im_addr),
    .im_data (im_data),
    .start   (start),
    .running (running),
    .done    (done),
    .stall   (stall),
    .gmem_req(m_req[2]),
    .gmem_rsp(m_rsp[2])
  );

  assign cgra_busy = running;
endmodule
