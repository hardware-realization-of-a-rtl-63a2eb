// bus_scheduler: the system controller's bus schedule.  It hands the common
// bus to one unit after another in the fixed sequence of a processing cycle:
//   acquisition (DAU writes bit-reversed samples)  ->
//   transform   (FFT processor works in place)     ->
//   display     (magnitude unit reads the spectrum) ->
//   idle        (the host owns the bus).
// A start pulse in idle begins a cycle; each unit gets a one-clock start
// pulse when it receives the bus and returns it with its done pulse.  done of
// the scheduler pulses when the display phase ends.  In the published system
// this sequencing is the host microprocessor's program; a four-state machine
// does it here.
module bus_scheduler (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                dau_done,
  input  logic                fft_done,
  input  logic                mag_done,
  output fft_pkg::bus_owner_t grant,
  output logic                dau_start,
  output logic                fft_start,
  output logic                mag_start,
  output logic                done
);
  import fft_pkg::*;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant     <= OWN_HOST;
      dau_start <= 1'b0;
      fft_start <= 1'b0;
      mag_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      dau_start <= 1'b0;
      fft_start <= 1'b0;
      mag_start <= 1'b0;
      done      <= 1'b0;
      unique case (grant)
        OWN_HOST: if (start)    begin grant <= OWN_DAU;  dau_start <= 1'b1; end
        OWN_DAU:  if (dau_done) begin grant <= OWN_FFT;  fft_start <= 1'b1; end
        OWN_FFT:  if (fft_done) begin grant <= OWN_MAG;  mag_start <= 1'b1; end
        OWN_MAG:  if (mag_done) begin grant <= OWN_HOST; done      <= 1'b1; end
        default:  grant <= OWN_HOST;
      endcase
    end
  end
endmodule
