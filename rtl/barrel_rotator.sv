// barrel_rotator: pipelined log2(N)-stage barrel shifter used as an input
// rotator.
//
// All N input lanes are rotated together by the amount `shift`: the packet on
// input lane s leaves on lane (s + shift) mod N. The rotation is built as a
// barrel shifter, one stage per bit of the shift amount; stage k moves every
// lane by 2^k positions when bit k of the amount is set, and is followed by a
// pipeline register. The shift amount sampled with the packets travels down
// the pipeline with them, so every packet that entered in the same cycle is
// rotated by the same amount (this design's choice: the switch description
// only says the stage selects come from the cycle counter). The direction of
// the rotation is this design's choice as well.
//
// Interface: in_valid/in_lane per lane, shift (log2 N bits); out_valid/
// out_lane per lane. N must be a power of two and at least 2.
// Timing: STAGES = log2(N) cycles of latency, one packet per lane per cycle.
// Only the valid bits are reset (synchronous, active high); the lane payload
// is plain data pipeline.
module barrel_rotator
  import qbs_pkg::*;
#(
  parameter int unsigned N = DEFAULT_NUM_IN,
  parameter int unsigned W = DEFAULT_DATA_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [idx_w(N)-1:0] shift,
  input  logic                in_valid [N],
  input  logic [W-1:0]        in_lane  [N],
  output logic                out_valid[N],
  output logic [W-1:0]        out_lane [N]
);

  localparam int unsigned STAGES = idx_w(N);

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $fatal(1, "barrel_rotator: N must be a power of two >= 2");
  end

  // stage_* [k] is the input of stage k; index STAGES is the final register.
  logic                vld   [STAGES+1][N];
  logic [W-1:0]        lane  [STAGES+1][N];
  logic [STAGES-1:0]   amt   [STAGES+1];

  always_comb begin
    vld[0]  = in_valid;
    lane[0] = in_lane;
    amt[0]  = shift;
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    localparam int unsigned DIST = 1 << k;
    logic         nxt_vld  [N];
    logic [W-1:0] nxt_lane [N];

    always_comb begin
      for (int j = 0; j < N; j++) begin
        if (amt[k][k]) begin
          nxt_vld[j]  = vld[k][(j + N - DIST) % N];
          nxt_lane[j] = lane[k][(j + N - DIST) % N];
        end else begin
          nxt_vld[j]  = vld[k][j];
          nxt_lane[j] = lane[k][j];
        end
      end
    end

    always_ff @(posedge clk) begin
      lane[k+1] <= nxt_lane;
      amt[k+1]  <= amt[k];
      for (int j = 0; j < N; j++) vld[k+1][j] <= rst ? 1'b0 : nxt_vld[j];
    end
  end

  assign out_valid = vld[STAGES];
  assign out_lane  = lane[STAGES];

endmodule
