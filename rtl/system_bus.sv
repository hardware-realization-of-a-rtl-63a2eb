// system_bus: the common data, address and control bus of the system.  The
// master named by `grant` (host, DAU, FFT processor or magnitude unit)
// drives the memory address, write strobe and write data; all masters see
// the memory read data directly.  The shared tri-state bus of the original
// is a multiplexer here, so no two masters can ever drive it at once.
// Combinational.
module system_bus #(
  parameter int unsigned AW = fft_pkg::LOG2N + 1,
  parameter int unsigned MW = fft_pkg::MW
) (
  input  fft_pkg::bus_owner_t    grant,
  input  logic [3:0][AW-1:0]     m_addr,
  input  logic [3:0]             m_we,
  input  logic [3:0][MW-1:0]     m_wdata,
  output logic [AW-1:0]          addr,
  output logic                   we,
  output logic [MW-1:0]          wdata
);
  always_comb begin
    addr  = m_addr[grant];
    we    = m_we[grant];
    wdata = m_wdata[grant];
  end
endmodule
