// offload_unit_model: behavioural stand-in for one Offload Unit (CRC,
// firewall, SHA-3, AES, JPEG decoder or RSS core) in the pipeline clock.
//
// The real cores are separate designs; this model only reproduces their
// bandwidth and latency. It fetches 512-bit fragments from its input queue at
// the unit's own rate, W_UNIT bits per cycle of an F_UNIT_MHZ clock, i.e. one
// fragment whenever a credit counter that grows by W_UNIT*F_UNIT_MHZ per
// 250 MHz cycle reaches 512*250. A packet becomes ready DELAY cycles (the
// unit's non-pipelined cycles) after its last fragment was fetched and is then
// returned one beat per cycle with its metadata unchanged, while the unit
// already fetches the next packet. As its only change to the data it shifts
// ID+1 into the trace field (bytes 56..63 of the first beat).
module offload_unit_model
  import flexpipe_pkg::*;
#(
  parameter int unsigned ID         = 0,
  parameter int unsigned W_UNIT     = 64,
  parameter int unsigned F_UNIT_MHZ = 250,
  parameter int unsigned DELAY      = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  axis_beat_t in_beat,
  output logic       out_valid,
  input  logic       out_ready,
  output axis_beat_t out_beat
);
  localparam int unsigned THR  = DATA_W * F_PIPE_MHZ;
  localparam int unsigned STEP = W_UNIT * F_UNIT_MHZ;

  int unsigned credit;
  longint      cyc;
  axis_beat_t  beats [$];        // fetched beats, in order
  longint      ready_at [$];     // per complete packet: cycle it may leave
  bit          first_in, first_out;

  assign in_ready  = rst_n && (credit >= THR);
  assign out_valid = rst_n && (ready_at.size() > 0) && (ready_at[0] <= cyc) && (beats.size() > 0);
  always_comb begin
    out_beat = (beats.size() > 0) ? beats[0] : '0;
    if (first_out)
      out_beat.tdata[DATA_W-1 -: 64] = {out_beat.tdata[DATA_W-9 -: 56], 8'(ID + 1)};
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      credit = 0; cyc = 0; first_out = 1;
      beats.delete(); ready_at.delete();
    end else begin
      cyc++;
      if (out_valid && out_ready) begin
        first_out = beats[0].tlast;
        if (beats[0].tlast) void'(ready_at.pop_front());
        void'(beats.pop_front());
      end
      if (in_valid && in_ready) begin
        beats.push_back(in_beat);
        if (in_beat.tlast) ready_at.push_back(cyc + DELAY);
        credit = credit - THR;
      end
      if (credit < THR) credit = credit + STEP;
    end
  end
endmodule
