// input_port_tb: one input port alone, with the rest of the scheduling
// chain played by the testbench.
//
// Random packets arrive (default route table: output = destination mod 8);
// avail_in, the outputs left free by earlier inputs, and sched_en are
// random. Checked every cycle: the grant is the lowest output with
// unscheduled cells that is still available (none if sched_en is low);
// avail_out = avail_in minus the grant; each departing cell leaves F+1
// cycles after its grant, towards the granted output, and per output the
// cells leave in the order the packets brought them, with their data. All
// cells must have left after the sources stop. Coverage: full buffer,
// grants masked by avail_in, multi-cell packets.
module input_port_tb;
  localparam int unsigned N = 8, F = 16, W = 8, MC = 16, LW = 5, NW = 3, SW = 4;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_full = 0, n_masked = 0, n_multi = 0, n_dep = 0;
  bit sources_on = 1;

  logic            clk = 0, rst = 1;
  logic            pkt_valid, pkt_ready, rt_wr_en, sched_en;
  logic [31:0]     pkt_dst;
  logic [LW-1:0]   pkt_len;
  logic [MC*W-1:0] pkt_data;
  logic [3:0]      rt_wr_addr;
  logic [NW-1:0]   rt_wr_port, out_port;
  logic [SW-1:0]   slot;
  logic [N-1:0]    avail_in, avail_out, sched_q, voq_empty;
  logic            out_valid, buf_full, np_stall;
  logic [W-1:0]    out_data;

  input_port dut (
    .clk, .rst, .pkt_valid, .pkt_ready, .pkt_dst, .pkt_len, .pkt_data,
    .rt_wr_en, .rt_wr_addr, .rt_wr_port, .slot, .sched_en, .avail_in, .avail_out,
    .sched_q, .out_valid, .out_port, .out_data, .buf_full, .voq_empty, .np_stall
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) slot <= rst ? '0 : slot + 1'b1;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycles, msg);
  endtask

  logic [W-1:0] exp_cells [N][$];
  int           unsched_n [N];
  int           sched_t [$];
  int           sched_p [$];
  int           in_buf [N];   // cells of each output in the buffer
  // Output ports of the cells the network processor still has to hand on;
  // the front one goes to the queue manager in every cycle np_stall is low.
  int           pend [$];

  // Sampled 2 time units after the falling edge, once all stimulus of
  // this cycle (applied at the falling edge or 1 unit after) has settled.
  always @(negedge clk) begin
    #2;
    if (!rst) begin
      logic [N-1:0] want, exp_q;
      int first;
      for (int j = 0; j < N; j++) want[j] = (unsched_n[j] > 0);
      exp_q = '0;
      if (sched_en)
        for (int j = 0; j < N; j++)
          if (want[j] && avail_in[j]) begin exp_q[j] = 1'b1; break; end
      if (sched_en && want != 0) begin
        first = 0;
        for (int j = N - 1; j >= 0; j--) if (want[j]) first = j;
        if (!avail_in[first]) n_masked++;
      end
      checks++;
      if (sched_q !== exp_q) fail($sformatf("grant %b expected %b", sched_q, exp_q));
      checks++;
      if (avail_out !== (avail_in & ~exp_q)) fail("avail_out");
      for (int j = 0; j < N; j++) begin
        checks++;
        if (voq_empty[j] !== (in_buf[j] == 0)) fail($sformatf("voq_empty[%0d]", j));
      end
      if (out_valid) begin
        n_dep++;
        checks++;
        if (sched_t.size() == 0) fail("unscheduled departure");
        else begin
          if (cycles - sched_t[0] != F + 1) fail($sformatf("latency %0d", cycles - sched_t[0]));
          if (out_port != NW'(sched_p[0])) fail("departure port");
          void'(sched_t.pop_front());
          void'(sched_p.pop_front());
        end
        checks++;
        if (exp_cells[out_port].size() == 0) fail("no cell expected");
        else begin
          if (out_data !== exp_cells[out_port][0])
            fail($sformatf("output %0d data %h expected %h", out_port, out_data, exp_cells[out_port][0]));
          void'(exp_cells[out_port].pop_front());
        end
      end
      if (np_stall) begin
        n_full++;
        checks++;
        if (!buf_full) fail("stall without a full buffer");
        if (pend.size() == 0) fail("stall without a cell");
      end
      for (int j = 0; j < N; j++)
        if (sched_q[j]) begin
          unsched_n[j]--;
          sched_t.push_back(cycles);
          sched_p.push_back(j);
        end
      // A cell leaves its queue when its grant is read from the output
      // memory, F cycles after the grant (its data follows a cycle later).
      foreach (sched_t[k])
        if (sched_t[k] == cycles - F) in_buf[sched_p[k]]--;
      if (pend.size() != 0 && !np_stall) begin
        unsched_n[pend[0]]++;
        in_buf[pend[0]]++;
        void'(pend.pop_front());
      end
    end
  end

  // Packet source; the expected cells are queued when the packet is taken.
  initial begin
    pkt_valid = 0; pkt_dst = 0; pkt_len = 1; pkt_data = 0;
    rt_wr_en = 0; rt_wr_addr = 0; rt_wr_port = 0;
    for (int j = 0; j < N; j++) begin unsched_n[j] = 0; in_buf[j] = 0; end
    wait (!rst);
    while (sources_on) begin
      @(negedge clk);
      if ($urandom_range(0, 99) < 70) begin
        int len;
        len = ($urandom_range(0, 3) == 0) ? 1 : $urandom_range(2, MC);
        pkt_valid = 1;
        pkt_dst   = $urandom;
        pkt_len   = LW'(len);
        for (int k = 0; k < MC; k++) pkt_data[k*W +: W] = W'($urandom);
        do @(posedge clk); while (!pkt_ready);
        for (int k = 0; k < len; k++) begin
          exp_cells[pkt_dst[2:0]].push_back(pkt_data[k*W +: W]);
          pend.push_back(pkt_dst[2:0]);
        end
        if (len > 1) n_multi++;
        #1 pkt_valid = 0;
      end
    end
  end

  initial begin
    sched_en = 1; avail_in = '1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      #1;
      avail_in = ($urandom_range(0, 2) == 0) ? '1 : N'($urandom);
      sched_en = 1'($urandom_range(0, 7) != 0);
    end
    sources_on = 0;
    @(negedge clk);
    #1 avail_in = '1; sched_en = 1;
    repeat (2 * MC + 40 * F) @(posedge clk);
    for (int j = 0; j < N; j++) begin
      checks++;
      if (exp_cells[j].size() != 0) fail($sformatf("output %0d: %0d cells never left", j, exp_cells[j].size()));
    end
    $display("coverage: full=%0d masked=%0d multi_cell=%0d departures=%0d", n_full, n_masked, n_multi, n_dep);
    checks++;
    if (n_full == 0 || n_masked == 0 || n_multi == 0 || n_dep == 0) fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
