// router_scheduler_env: reusable end-to-end test of the whole scheduler
// for any size; router_scheduler_tb (default size) and
// router_scheduler_scaled_tb (other sizes) wrap it. With DEFAULTS set the
// scheduler is instantiated with no parameter overrides, so N and F must
// then equal the defaults (8 and 16).
//
// Every input receives random packets; the route table of input 1 is
// rewritten halfway. The environment keeps its own model of the packets
// taken, the route tables, and the cells each network processor hands to
// its queue manager (one per cycle unless np_stall):
//  * per input and output, the cells leave in arrival order with their data
//    intact and the right output port;
//  * in every cycle the cells leaving the inputs go to distinct outputs
//    (non-blocking);
//  * every cell leaves exactly F+1 cycles after the slot that scheduled it;
//  * the schedule of each slot is sequential greedy: input i, if enabled,
//    gets the lowest output for which it has unscheduled cells among those
//    no earlier input took, and nothing if there is none (maximal matching);
//  * all cells are delivered after the sources stop.
// A stall must only happen with a full buffer.
// Coverage counts, each of which must be non-zero: processor stalls on a
// full buffer, contention (an input's first choice taken by an earlier
// input), multi-cell packets, slots with the scheduling enable low, full
// frames completed, departures.
// Results go out on checks/failures; done rises at the end. The clock is
// generated here.
module router_scheduler_env #(
  parameter int unsigned N        = 8,
  parameter int unsigned F        = 16,
  parameter bit          DEFAULTS = 1'b1
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int unsigned W = 8, MC = 16, LW = 5, RA = 4;
  localparam int unsigned NW = $clog2(N), SW = $clog2(F);
  int cycles = 0;
  int n_stall = 0, n_contend = 0, n_multi = 0, n_disabled = 0, n_frames = 0, n_dep = 0;
  bit sources_on = 1;

  logic              clk = 0, rst = 1;
  logic              pkt_valid  [N];
  logic              pkt_ready  [N];
  logic [31:0]       pkt_dst    [N];
  logic [LW-1:0]     pkt_len    [N];
  logic [MC*W-1:0]   pkt_data   [N];
  logic              rt_wr_en   [N];
  logic [RA-1:0]     rt_wr_addr [N];
  logic [NW-1:0]     rt_wr_port [N];
  logic [N-1:0]      sched_en;
  logic [SW-1:0]     slot;
  logic [N-1:0]      sched_q    [N];
  logic [N-1:0]      avail_last;
  logic              out_valid  [N];
  logic [NW-1:0]     out_port   [N];
  logic [W-1:0]      out_data   [N];
  logic [N-1:0]      buf_full;
  logic [N-1:0]      voq_empty  [N];
  logic [N-1:0]      np_stall;

  if (DEFAULTS) begin : g_dut
    router_scheduler dut (
    .clk, .rst, .pkt_valid, .pkt_ready, .pkt_dst, .pkt_len, .pkt_data,
    .rt_wr_en, .rt_wr_addr, .rt_wr_port, .sched_en, .slot, .sched_q, .avail_last,
    .out_valid, .out_port, .out_data, .buf_full, .voq_empty, .np_stall
  );
  end else begin : g_dut
    router_scheduler #(.N(N), .F(F)) dut (
    .clk, .rst, .pkt_valid, .pkt_ready, .pkt_dst, .pkt_len, .pkt_data,
    .rt_wr_en, .rt_wr_addr, .rt_wr_port, .sched_en, .slot, .sched_q, .avail_last,
    .out_valid, .out_port, .out_data, .buf_full, .voq_empty, .np_stall
  );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycles, msg);
  endtask

  // Reference state.
  logic [W-1:0] exp_cells [N][N][$];  // [input][output] cell data in order
  int           unsched_n [N][N];     // unscheduled cells per input/output
  int           sched_t   [N][$];     // per input: cycle of each grant
  int           sched_p   [N][$];     // per input: output of each grant

  // Model of each network processor: the cells of the packets it has taken
  // and not yet handed on, tagged through a copy of its route table. The
  // front cell is handed to the queue manager in every cycle np_stall is low.
  typedef struct {
    logic [NW-1:0] port;
    logic [W-1:0]  data;
  } cell_t;
  cell_t         pend    [N][$];
  logic [NW-1:0] route_m [N][2**RA];
  bit            hold    [N];        // source i must not start a packet

  // Check everything in the middle of each cycle, update the model at the
  // edge that follows.
  // Sampled 2 time units after the falling edge, once all stimulus of
  // this cycle (applied at the falling edge or 1 unit after) has settled.
  always @(negedge clk) begin
    #2;
    if (!rst) begin
      logic [N-1:0] avail;
      logic [N-1:0] used_out;
      avail = '1;
      used_out = '0;
      for (int i = 0; i < N; i++) begin
        logic [N-1:0] want, exp_q;
        want = '0;
        for (int j = 0; j < N; j++) want[j] = (unsched_n[i][j] > 0);
        exp_q = '0;
        if (sched_en[i]) begin
          for (int j = 0; j < N; j++)
            if (want[j] && avail[j]) begin exp_q[j] = 1'b1; break; end
          if (want != 0) begin
            int first = 0;
            for (int j = N - 1; j >= 0; j--) if (want[j]) first = j;
            if (!avail[first]) n_contend++;
          end
        end else if (want != 0) begin
          n_disabled++;
        end
        checks++;
        if (sched_q[i] !== exp_q)
          fail($sformatf("input %0d grant %b expected %b (avail %b)", i, sched_q[i], exp_q, avail));
        avail &= ~exp_q;
        // Departures.
        if (out_valid[i]) begin
          n_dep++;
          checks++;
          if (used_out[out_port[i]]) fail($sformatf("output %0d used twice", out_port[i]));
          used_out[out_port[i]] = 1'b1;
          checks++;
          if (sched_t[i].size() == 0) begin
            fail($sformatf("input %0d sent an unscheduled cell", i));
          end else begin
            if (cycles - sched_t[i][0] != F + 1)
              fail($sformatf("input %0d latency %0d", i, cycles - sched_t[i][0]));
            if (out_port[i] != NW'(sched_p[i][0]))
              fail($sformatf("input %0d port %0d expected %0d", i, out_port[i], sched_p[i][0]));
            void'(sched_t[i].pop_front());
            void'(sched_p[i].pop_front());
          end
          checks++;
          if (exp_cells[i][out_port[i]].size() == 0) begin
            fail($sformatf("input %0d output %0d: no cell expected", i, out_port[i]));
          end else begin
            if (out_data[i] !== exp_cells[i][out_port[i]][0])
              fail($sformatf("input %0d output %0d data %h expected %h", i, out_port[i],
                             out_data[i], exp_cells[i][out_port[i]][0]));
            void'(exp_cells[i][out_port[i]].pop_front());
          end
        end
        if (np_stall[i]) begin
          n_stall++;
          checks++;
          if (pend[i].size() == 0) fail($sformatf("input %0d stalls with no cell", i));
          if (!buf_full[i]) fail($sformatf("input %0d stalls with room in its buffer", i));
        end
      end
      checks++;
      if (avail_last !== avail) fail("avail_last");
      if (slot == SW'(F - 1)) n_frames++;
      // Model update for this cycle's edge.
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++)
          if (sched_q[i][j]) begin
            unsched_n[i][j]--;
            sched_t[i].push_back(cycles);
            sched_p[i].push_back(j);
          end
        if (pend[i].size() != 0 && !np_stall[i]) begin
          cell_t c;
          c = pend[i].pop_front();
          unsched_n[i][c.port]++;
          exp_cells[i][c.port].push_back(c.data);
        end
      end
    end
  end

  // Packet sources: bursty, with hot outputs so inputs contend.
  for (genvar i = 0; i < N; i++) begin : g_src
    initial begin
      pkt_valid[i] = 0; pkt_dst[i] = 0; pkt_len[i] = 1; pkt_data[i] = 0;
      rt_wr_en[i] = 0; rt_wr_addr[i] = 0; rt_wr_port[i] = 0;
      wait (!rst);
      while (sources_on) begin
        @(negedge clk);
        if (!hold[i] && $urandom_range(0, 99) < 60) begin
          int len;
          len = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(2, MC);
          pkt_valid[i] = 1;
          pkt_dst[i]   = $urandom;  // half of them below go to hot outputs 0, 1
          if ($urandom_range(0, 1) == 0) pkt_dst[i][RA-1:0] = RA'($urandom_range(0, 1));
          pkt_len[i]   = LW'(len);
          for (int k = 0; k < MC; k++) pkt_data[i][k*W +: W] = W'($urandom);
          do @(posedge clk); while (!pkt_ready[i]);
          for (int k = 0; k < len; k++) begin
            cell_t c;
            c.port = route_m[i][pkt_dst[i][RA-1:0]];
            c.data = pkt_data[i][k*W +: W];
            pend[i].push_back(c);
          end
          if (len > 1) n_multi++;
          #1 pkt_valid[i] = 0;
        end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    sched_en = '1;
    for (int i = 0; i < N; i++) begin
      hold[i] = 0;
      for (int j = 0; j < N; j++) unsched_n[i][j] = 0;
      for (int a = 0; a < 2**RA; a++) route_m[i][a] = NW'(a % N);
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Scheduling enable toggled on some inputs for a while.
    repeat (600) @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      sched_en = N'($urandom) | N'(1);
    end
    @(negedge clk) sched_en = '1;
    // Rewrite the route table of input 1 while it runs: all to output N-1.
    // Input 1 takes no packet meanwhile, so no lookup races a write.
    hold[1] = 1;
    wait (pkt_valid[1] == 0);
    @(negedge clk);
    for (int a = 0; a < 2**RA; a++) begin
      rt_wr_en[1] = 1; rt_wr_addr[1] = RA'(a); rt_wr_port[1] = NW'(N - 1);
      @(posedge clk);
      route_m[1][a] = NW'(N - 1);
      @(negedge clk);
    end
    rt_wr_en[1] = 0;
    hold[1] = 0;
    repeat (1200) @(posedge clk);
    sources_on = 0;
    repeat (2 * MC + 4) @(posedge clk);
    // Drain: every accepted cell must leave.
    repeat (60 * F) @(posedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (exp_cells[i][j].size() != 0)
          fail($sformatf("input %0d output %0d: %0d cells never left", i, j, exp_cells[i][j].size()));
      end
    $display("N=%0d F=%0d coverage: stalls=%0d contention=%0d multi_cell=%0d disabled=%0d frames=%0d departures=%0d",
             N, F, n_stall, n_contend, n_multi, n_disabled, n_frames, n_dep);
    checks++;
    if (n_stall == 0 || n_contend == 0 || n_multi == 0 || n_disabled == 0 || n_frames == 0 || n_dep == 0)
      fail("a mechanism was never exercised");
    done = 1'b1;
  end
endmodule
