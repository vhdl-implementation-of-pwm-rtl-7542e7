// amplitude_module: amplitude-scaled cosine of the three phases with one
// shared cosine table.
//
// For each phase k it computes A*cos(theta_k), where the amplitude A is
// coded as an angle phi with A = cos(phi). The product is replaced by the
// identity cos(phi)*cos(theta) = [cos(theta+phi) + cos(theta-phi)]/2, so
// the datapath is two 10-bit add/subtract operations, two table reads, one
// 9-bit add and a right shift, with no multiplier. In offset form (127 = 0)
// the result is out = 127 + 127*cos(phi)*cos(theta), range 0..254.
//
// The six table reads per update share a single cos_lut through a step
// counter running 0..11 on every clock. At step 0 the amplitude and the
// three phases are snapshotted. For phase k (k = 0,1,2):
//   step 4k   : table address = (theta_k + phi)[9:2]
//   step 4k+1 : table output captured as cos(theta_k + phi)
//   step 4k+2 : table address = (theta_k - phi)[9:2]
//   step 4k+3 : out[k] <= (cos(theta_k+phi) + table output) >> 1
// All three outputs are therefore refreshed once every 12 clocks; an input
// change is reflected at most 12+3+8 = 23 clocks later (for phase 2).
//
// The identity, the 8-bit amplitude angle, the 8-MSB table address and the
// 0..11 schedule of the first phase follow the source description; the
// schedule of the other two phases, the snapshot and the output registers
// are this design's completion of it.
module amplitude_module
  import vvvf_pkg::*;
(
  input  logic               clock,
  input  logic               reset,
  input  logic [DATA_W-1:0]  amp,
  input  logic [PHASE_W-1:0] phase [3],
  output logic [DATA_W-1:0]  out   [3]
);

  logic [3:0]         step;
  logic [DATA_W-1:0]  amp_s;
  logic [PHASE_W-1:0] phase_s [3];
  logic [DATA_W-1:0]  cos_plus;
  logic [DATA_W-1:0]  rom_q;
  logic [7:0]         rom_addr;

  // Which phase and which sub-step of it the counter is in.
  logic [1:0] k;
  logic [1:0] sub;
  assign k   = step[3:2];
  assign sub = step[1:0];

  // The snapshot is written at step 0, so the step-0 address uses the
  // live inputs and later steps use the snapshot.
  logic [PHASE_W-1:0] theta;
  logic [DATA_W-1:0]  phi;
  logic [PHASE_W-1:0] angle;

  always_comb begin
    if (step == 4'd0) begin
      theta = phase[0];
      phi   = amp;
    end else begin
      theta = phase_s[k];
      phi   = amp_s;
    end
    angle    = sub[1] ? theta - PHASE_W'(phi) : theta + PHASE_W'(phi);
    rom_addr = angle[PHASE_W-1 -: 8];
  end

  cos_lut u_cos (
    .clock (clock),
    .addr  (rom_addr),
    .data  (rom_q)
  );

  logic [DATA_W:0] sum;
  assign sum = {1'b0, cos_plus} + {1'b0, rom_q};

  always_ff @(posedge clock) begin
    if (reset) begin
      step     <= '0;
      amp_s    <= '0;
      phase_s  <= '{default: '0};
      cos_plus <= COS_MID;
      out      <= '{default: COS_MID};
    end else begin
      step <= (step == 4'd11) ? 4'd0 : step + 4'd1;
      if (step == 4'd0) begin
        amp_s   <= amp;
        phase_s <= phase;
      end
      if (sub == 2'd1)
        cos_plus <= rom_q;
      if (sub == 2'd3)
        out[k] <= sum[DATA_W:1];
    end
  end

endmodule
