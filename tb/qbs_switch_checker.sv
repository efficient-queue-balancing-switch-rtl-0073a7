// qbs_switch_checker: traffic generator, cycle-accurate reference model and
// scoreboard for the queue-balancing switch, shared by the switch
// testbenches. It drives the clock, reset and input ports of a qbs_switch
// instance that the testbench wires to it, and watches its outputs.
//
// Traffic: first a single packet on an idle switch to measure the port-to-
// port latency, which must be log2(NUM_IN) + 2 cycles. Then uniform bursty
// traffic: every source sends bursts to one random destination, with a
// geometric burst length of mean MEAN_BURST and geometric idle gaps whose
// mean makes the average load RATE_PCT percent; then the inputs go quiet
// and the switch drains. With STANDALONE = 0 the checker only raises `done`
// at the end and leaves the verdict to the testbench, which then reads
// checks, failures, sent and dropped.
//
// Checks: every cycle the outputs and drop flags equal those of a
// cycle-accurate model written from the switch's description (counter-
// driven rotation, FIFOs that drop when full, valid-bit queues, lowest
// group first inside one arrival vector). Independently of the model, every
// delivered packet must be at its destination, packets of one source to one
// destination must leave in sending order, and at the end every packet must
// have been either delivered or dropped. The mechanisms of the design must
// each occur at least once: a source landing in several queue groups, a
// dropped packet, an arrival vector with several packets, an output busy on
// consecutive cycles, and queue-group counts that differ between groups.
// Packets carry {seq[15:0], dest[7:0], src[7:0]} in the low 32 bits and a
// function of them in the rest, so DATA_W must be at least 32.
module qbs_switch_checker
  import qbs_pkg::*;
#(
  parameter int unsigned NUM_IN     = 4,
  parameter int unsigned NUM_OUT    = 4,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned FIFO_DEPTH = 2,
  parameter int unsigned CYCLES     = 2000,
  parameter int unsigned RATE_PCT   = 80,
  parameter int unsigned MEAN_BURST = 8,
  parameter bit          STANDALONE = 1'b1,  // print TB_RESULT and $finish
  parameter bit          EXPECT_DROPS = 1'b1 // fail the run if nothing was dropped
) (
  output logic                      clk,
  output logic                      rst,
  output logic                      done,
  output logic                      in_valid [NUM_IN],
  output logic [idx_w(NUM_OUT)-1:0] in_dest  [NUM_IN],
  output logic [DATA_W-1:0]         in_data  [NUM_IN],
  input  logic                      out_valid[NUM_OUT],
  input  logic [DATA_W-1:0]         out_data [NUM_OUT],
  input  logic [NUM_IN-1:0]         drop
);

  localparam int S         = $clog2(NUM_IN);
  localparam int LATENCY   = S + 2;
  localparam int DRAIN     = NUM_IN * FIFO_DEPTH * 2 + 4 * S + 20;
  localparam int WATCHDOG  = CYCLES + DRAIN + 200;

  int checks = 0, failures = 0;

  initial clk = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ helpers
  function automatic logic [DATA_W-1:0] make_pkt(int src, int dst, int seq);
    logic [31:0] low = {16'(seq), 8'(dst), 8'(src)};
    logic [DATA_W-1:0] w = '0;
    for (int b = 32; b < DATA_W; b++) w[b] = low[(b * 7) % 32] ^ low[b % 32] ^ b[0];
    w[31:0] = low;
    return w;
  endfunction

  // ------------------------------------------------------- model state
  int                 cnt;
  logic               pipe_v [S][NUM_IN];
  logic [DATA_W-1:0]  pipe_d [S][NUM_IN];
  int                 pipe_t [S][NUM_IN];
  logic [DATA_W-1:0]  pq     [NUM_IN][NUM_OUT][$];
  logic [NUM_IN-1:0]  vq     [NUM_OUT][$];
  logic [NUM_IN-1:0]  served [NUM_OUT];
  logic               m_out_v[NUM_OUT];
  logic [DATA_W-1:0]  m_out_d[NUM_OUT];

  // ------------------------------------------------- scoreboard state
  int sent = 0, delivered = 0, dropped = 0;
  int next_seq [NUM_IN][NUM_OUT];
  int last_seen[NUM_IN][NUM_OUT];
  int group_mask[NUM_IN];           // queue groups each source has used
  int group_pushes[NUM_IN];
  int n_multi = 0, n_busy_runs = 0, n_drops = 0;
  int sent_at[int];                 // send cycle per {src, dst, seq}
  longint lat_sum = 0;              // sum of port-to-port latencies
  int     lat_max = 0;
  logic prev_out_v[NUM_OUT];

  // traffic state
  int burst_left[NUM_IN];
  int burst_dst [NUM_IN];

  // probability, in 1/1000 per idle cycle, of starting a burst
  localparam int START_PM = (RATE_PCT >= 100) ? 1000 :
                            (1000 * RATE_PCT) / (RATE_PCT + MEAN_BURST * (100 - RATE_PCT));
  localparam int STOP_PM  = 1000 / MEAN_BURST;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    if (!done) begin
      failures++;
      $display("watchdog expired");
    end
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    int lat_seen;
    lat_seen = -1;
    done = 0;
    rst = 1;
    for (int i = 0; i < NUM_IN; i++) begin
      in_valid[i] = 0; in_dest[i] = '0; in_data[i] = '0;
      burst_left[i] = 0; burst_dst[i] = 0; group_mask[i] = 0; group_pushes[i] = 0;
      for (int d = 0; d < NUM_OUT; d++) begin next_seq[i][d] = 0; last_seen[i][d] = -1; end
    end
    cnt = 0;
    for (int k = 0; k < S; k++) for (int j = 0; j < NUM_IN; j++) begin
      pipe_v[k][j] = 0; pipe_d[k][j] = '0; pipe_t[k][j] = 0;
    end
    for (int d = 0; d < NUM_OUT; d++) begin
      served[d] = '0; m_out_v[d] = 0; m_out_d[d] = '0; prev_out_v[d] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;

    for (int t = 0; t < CYCLES + DRAIN; t++) begin
      logic               dv   [NUM_IN];
      logic [DATA_W-1:0]  dd   [NUM_IN];
      int                 ddst [NUM_IN];
      logic [NUM_IN-1:0]  m_drop;
      logic [NUM_IN-1:0]  enq  [NUM_OUT];
      logic [NUM_IN-1:0]  grant[NUM_OUT];
      logic               nv   [NUM_OUT];
      logic [DATA_W-1:0]  nd   [NUM_OUT];

      @(negedge clk);
      // ---- compare the design with the model (state after the last edge)
      for (int d = 0; d < NUM_OUT; d++) begin
        checks++;
        if (out_valid[d] != m_out_v[d] || (m_out_v[d] && out_data[d] != m_out_d[d])) begin
          failures++;
          if (failures < 10) $display("t=%0d port %0d: got v=%0d %h, model v=%0d %h", t, d,
                                      out_valid[d], out_data[d][31:0], m_out_v[d], m_out_d[d][31:0]);
        end
        // model-free checks on what the design delivered
        if (out_valid[d]) begin
          int src, dst, seq;
          src = int'(out_data[d][7:0]);
          dst = int'(out_data[d][15:8]);
          seq = int'(out_data[d][31:16]);
          checks++;
          if (dst != d || src >= NUM_IN || out_data[d] != make_pkt(src, dst, seq) ||
              seq <= last_seen[src][d]) begin
            failures++;
            if (failures < 10) $display("t=%0d port %0d: bad packet src %0d dst %0d seq %0d (last %0d)",
                                        t, d, src, dst, seq, (src < NUM_IN) ? last_seen[src][d] : -1);
          end else begin
            int key, lat;
            last_seen[src][d] = seq;
            key = (src << 24) | (dst << 16) | seq;
            if (sent_at.exists(key)) begin
              lat = t - sent_at[key];
              lat_sum += lat;
              lat_max = (lat > lat_max) ? lat : lat_max;
              sent_at.delete(key);
            end
          end
          delivered++;
          if (lat_seen < 0) lat_seen = t;
          if (prev_out_v[d]) n_busy_runs++;
        end
        prev_out_v[d] = out_valid[d];
      end

      // ---- model: combinational part of the current cycle
      for (int d = 0; d < NUM_OUT; d++) enq[d] = '0;
      m_drop = '0;
      if (S > 0) for (int j = 0; j < NUM_IN; j++) if (pipe_v[S-1][j]) begin
        int dst;
        dst = int'(pipe_d[S-1][j][15:8]);
        if (pq[j][dst].size() >= FIFO_DEPTH) m_drop[j] = 1'b1;
        else enq[dst][j] = 1'b1;
      end
      checks++;
      if (drop != m_drop) begin
        failures++;
        if (failures < 10) $display("t=%0d drop %b model %b", t, drop, m_drop);
      end
      n_drops += $countones(m_drop);
      dropped += $countones(m_drop);
      for (int d = 0; d < NUM_OUT; d++) begin
        logic [NUM_IN-1:0] pend;
        pend = (vq[d].size() != 0) ? (vq[d][0] & ~served[d]) : '0;
        grant[d] = pend & (~pend + 1'b1);
        nv[d] = (pend != '0);
        nd[d] = '0;
        for (int i = 0; i < NUM_IN; i++) if (grant[d][i]) nd[d] = pq[i][d][0];
        if (nv[d]) begin
          if ((pend & ~grant[d]) == '0) begin void'(vq[d].pop_front()); served[d] = '0; end
          else served[d] |= grant[d];
        end
      end

      // ---- new inputs for this cycle
      for (int i = 0; i < NUM_IN; i++) begin
        dv[i] = 0; ddst[i] = 0; dd[i] = '0;
        if (t == 0 && i == 0) begin
          dv[i] = 1; ddst[i] = NUM_OUT - 1;            // lone packet: latency probe
        end else if (t > LATENCY + 2 && t < CYCLES) begin
          if (burst_left[i] == 0 && $urandom_range(999) < START_PM) begin
            burst_dst[i]  = $urandom_range(NUM_OUT - 1);
            burst_left[i] = 1;
            while ($urandom_range(999) >= STOP_PM) burst_left[i]++;
          end
          if (burst_left[i] > 0) begin
            dv[i] = 1; ddst[i] = burst_dst[i]; burst_left[i]--;
          end
        end
        if (dv[i]) begin
          dd[i] = make_pkt(i, ddst[i], next_seq[i][ddst[i]]);
          sent_at[(i << 24) | (ddst[i] << 16) | (next_seq[i][ddst[i]] & 16'hffff)] = t;
          next_seq[i][ddst[i]]++;
          sent++;
        end
        in_valid[i] = dv[i];
        in_dest[i]  = idx_w(NUM_OUT)'(ddst[i]);
        in_data[i]  = dd[i];
      end

      // ---- model: state update at the coming edge
      for (int d = 0; d < NUM_OUT; d++) begin
        for (int i = 0; i < NUM_IN; i++) if (grant[d][i]) void'(pq[i][d].pop_front());
        m_out_v[d] = nv[d];
        m_out_d[d] = nd[d];
      end
      for (int d = 0; d < NUM_OUT; d++) if (enq[d] != '0) begin
        if ($countones(enq[d]) > 1) n_multi++;
        vq[d].push_back(enq[d]);
        for (int j = 0; j < NUM_IN; j++) if (enq[d][j]) begin
          pq[j][d].push_back(pipe_d[S-1][j]);
          group_mask[int'(pipe_d[S-1][j][7:0])] |= (1 << j);
          group_pushes[j]++;
        end
      end
      for (int k = S - 1; k > 0; k--) begin
        pipe_v[k] = pipe_v[k-1]; pipe_d[k] = pipe_d[k-1];
      end
      for (int s = 0; s < NUM_IN; s++) begin
        pipe_v[0][(s + cnt) % NUM_IN] = dv[s];
        pipe_d[0][(s + cnt) % NUM_IN] = dd[s];
      end
      cnt = (cnt + 1) % NUM_IN;
    end

    // ---- end of run
    checks++;
    if (lat_seen != LATENCY) begin
      failures++;
      $display("latency %0d cycles, expected %0d", lat_seen, LATENCY);
    end
    checks++;
    if (sent != delivered + dropped) begin
      failures++;
      $display("sent %0d delivered %0d dropped %0d", sent, delivered, dropped);
    end
    begin
      int spread, gmin, gmax;
      spread = 0; gmin = group_pushes[0]; gmax = group_pushes[0];
      for (int i = 0; i < NUM_IN; i++) begin
        if ($countones(group_mask[i]) > 1) spread++;
        gmin = (group_pushes[i] < gmin) ? group_pushes[i] : gmin;
        gmax = (group_pushes[i] > gmax) ? group_pushes[i] : gmax;
      end
      $display("mechanisms: rotation spread %0d sources, drops %0d, multi-packet arrivals %0d, busy back-to-back %0d",
               spread, n_drops, n_multi, n_busy_runs);
      $display("average port-to-port latency %0d.%02d cycles, maximum %0d",
               lat_sum / (delivered ? delivered : 1), (lat_sum * 100 / (delivered ? delivered : 1)) % 100,
               lat_max);
      $display("sent %0d delivered %0d dropped %0d (loss %0d.%02d%%), per-group pushes %0d..%0d",
               sent, delivered, dropped, dropped * 100 / (sent ? sent : 1),
               (dropped * 10000 / (sent ? sent : 1)) % 100, gmin, gmax);
      checks += 4;
      if (spread == 0)      begin failures++; $display("rotation never spread a source"); end
      if (n_drops == 0 && EXPECT_DROPS) begin failures++; $display("no overflow drop happened"); end
      if (n_multi == 0)     begin failures++; $display("no multi-packet arrival vector"); end
      if (n_busy_runs == 0) begin failures++; $display("no back-to-back output"); end
    end
    done = 1;
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
