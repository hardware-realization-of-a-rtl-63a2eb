// fft_system: the FFT processor in its distributed processing configuration.
//
// All units share one data, address and control bus to a two-page data
// memory.  A processing cycle, started by `start`, runs three phases with the
// bus handed from unit to unit by the bus scheduler:
//   1. acquisition: sample pairs arriving on smp_valid/smp_re/smp_im pass
//      through the DAU's I/O port and are written in bit-reversed order,
//      smp_re to the real page and smp_im to the imaginary page (two real
//      signals can thus be transformed at once);
//   2. transform: the FFT processor computes the N-point transform in place
//      (LOG2N * N/2 * 64 clocks);
//   3. display: the magnitude unit reads the spectrum in natural order and
//      hands {bin, L + 3/8 S} words to the display I/O port, seen outside as
//      disp_valid / disp_index / disp_mag and taken with disp_ready.
// Between cycles the host owns the bus through host_addr / host_we /
// host_wdata / host_rdata (address bit LOG2N selects the imaginary page).
// Samples offered outside the acquisition phase are ignored; a sample that
// arrives while the DAU port is still full is lost and sets `overrun`
// (cleared by the next start).  phase shows the bus owner (0 host, 1 DAU,
// 2 FFT, 3 magnitude).  The host processor, the converter and the display
// monitor are outside this module.
module fft_system #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N,
  parameter int unsigned DW    = fft_pkg::DW,
  parameter int unsigned MW    = fft_pkg::MW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             smp_valid,
  input  logic [DW-1:0]    smp_re,
  input  logic [DW-1:0]    smp_im,
  input  logic [LOG2N:0]   host_addr,
  input  logic             host_we,
  input  logic [MW-1:0]    host_wdata,
  output logic [MW-1:0]    host_rdata,
  output logic             disp_valid,
  input  logic             disp_ready,
  output logic [LOG2N-1:0] disp_index,
  output logic [DW-1:0]    disp_mag,
  output logic [1:0]       phase,
  output logic             busy,
  output logic             done,
  output logic             overrun,
  output logic             fft_unit_coef,
  output logic             fft_sat,
  output logic             mag_stall
);
  import fft_pkg::*;

  localparam int unsigned AW = LOG2N + 1;

  bus_owner_t        grant;
  logic              dau_start, fft_start, mag_start;
  logic              dau_done, fft_done, mag_done;
  logic [3:0][AW-1:0] m_addr;
  logic [3:0]        m_we;
  logic [3:0][MW-1:0] m_wdata;
  logic [AW-1:0]     mem_addr;
  logic              mem_we;
  logic [MW-1:0]     mem_wdata, mem_rdata;

  logic              aq_full, aq_rd;
  logic [2*DW-1:0]   aq_data;
  logic              dp_wr, dp_full;
  logic [LOG2N+DW-1:0] dp_din, dp_dout;
  logic              dau_busy, fft_busy, mag_busy, dp_ovr;

  bus_scheduler u_sched (
    .clk, .rst_n, .start,
    .dau_done, .fft_done, .mag_done,
    .grant, .dau_start, .fft_start, .mag_start, .done
  );

  assign phase = grant;
  assign busy  = (grant != OWN_HOST);

  // Host master
  assign m_addr[OWN_HOST]  = host_addr;
  assign m_we[OWN_HOST]    = host_we;
  assign m_wdata[OWN_HOST] = host_wdata;
  assign host_rdata        = mem_rdata;

  // Acquisition I/O port and DAU
  io_port #(.W(2*DW)) u_aq_port (
    .clk, .rst_n, .clr(start),
    .wr(smp_valid && (grant == OWN_DAU)), .din({smp_re, smp_im}),
    .rd(aq_rd), .full(aq_full), .dout(aq_data), .overrun
  );

  dau #(.LOG2N(LOG2N), .DW(DW), .MW(MW)) u_dau (
    .clk, .rst_n, .start(dau_start), .grant(grant == OWN_DAU),
    .port_full(aq_full), .port_data(aq_data), .port_rd(aq_rd),
    .mem_addr(m_addr[OWN_DAU]), .mem_we(m_we[OWN_DAU]), .mem_wdata(m_wdata[OWN_DAU]),
    .busy(dau_busy), .done(dau_done)
  );

  // FFT processor
  fft_processor #(.LOG2N(LOG2N), .DW(DW), .MW(MW)) u_fft (
    .clk, .rst_n, .start(fft_start), .busy(fft_busy), .done(fft_done),
    .mem_addr(m_addr[OWN_FFT]), .mem_we(m_we[OWN_FFT]), .mem_wdata(m_wdata[OWN_FFT]),
    .mem_rdata, .unit_coef_used(fft_unit_coef), .sat_event(fft_sat)
  );

  // Magnitude unit and display I/O port
  assign m_we[OWN_MAG]    = 1'b0;
  assign m_wdata[OWN_MAG] = '0;

  mag_unit #(.LOG2N(LOG2N), .DW(DW), .MW(MW)) u_mag (
    .clk, .rst_n, .start(mag_start),
    .mem_addr(m_addr[OWN_MAG]), .mem_rdata,
    .port_full(dp_full), .port_wr(dp_wr), .port_data(dp_din),
    .stall(mag_stall), .busy(mag_busy), .done(mag_done)
  );

  io_port #(.W(LOG2N + DW)) u_disp_port (
    .clk, .rst_n, .clr(1'b0),
    .wr(dp_wr), .din(dp_din),
    .rd(disp_ready && dp_full), .full(dp_full), .dout(dp_dout), .overrun(dp_ovr)
  );

  assign disp_valid = dp_full;
  assign {disp_index, disp_mag} = dp_dout;

  // Common bus and memory
  system_bus #(.AW(AW), .MW(MW)) u_bus (
    .grant, .m_addr, .m_we, .m_wdata,
    .addr(mem_addr), .we(mem_we), .wdata(mem_wdata)
  );

  data_memory #(.LOG2N(LOG2N), .MW(MW)) u_mem (
    .clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  // Units only drive the bus while they own it.
  a_dau_owns: assert property (@(posedge clk) disable iff (!rst_n) dau_busy |-> grant == OWN_DAU);
  a_fft_owns: assert property (@(posedge clk) disable iff (!rst_n) fft_busy |-> grant == OWN_FFT);
  a_mag_owns: assert property (@(posedge clk) disable iff (!rst_n) mag_busy |-> grant == OWN_MAG);
  // The magnitude unit never writes a full display port.
  a_no_disp_ovr: assert property (@(posedge clk) disable iff (!rst_n) !dp_ovr);
endmodule
