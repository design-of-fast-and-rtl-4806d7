// queue_manager_tb: queue manager with its linked-list memory under random
// arrivals, schedules and departures, any of them in the same cycle.
//
// Reference model: one queue of buffer addresses per output plus a count of
// how many of its leading cells are scheduled. Checked every cycle:
// arr_ready is high exactly while a location is free; the handed-out
// location is not in use; unsched[j] says whether VQL j holds unscheduled
// cells; dep_addr is the oldest cell of the departing VQL; vql_empty
// agrees. Coverage counts (each must be non-zero): full buffer (stall), all
// three operations in one cycle, arrival and departure on one VQL in one
// cycle, arrival and schedule on one VQL in one cycle, departure emptying a
// VQL while a cell arrives for it.
module queue_manager_tb;
  localparam int unsigned N  = 8;
  localparam int unsigned F  = 16;
  localparam int unsigned PW = 5;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_full = 0, n_three = 0, n_arr_dep_same = 0, n_arr_sched_same = 0, n_refill = 0;

  logic          clk = 0, rst = 1;
  logic          arr_valid, arr_ready, dep_valid, eql_empty;
  logic [2:0]    arr_port, dep_port;
  logic [PW-1:0] arr_addr, dep_addr;
  logic [N-1:0]  sched_q, unsched, vql_empty;
  logic [PW-1:0] lm_rd_addr [3];
  logic [PW-1:0] lm_rd_data [3];
  logic          lm_wr_en   [2];
  logic [PW-1:0] lm_wr_addr [2];
  logic [PW-1:0] lm_wr_data [2];

  queue_manager dut (
    .clk, .rst, .arr_valid, .arr_port, .arr_ready, .arr_addr,
    .sched_q, .unsched, .dep_valid, .dep_port, .dep_addr,
    .lm_rd_addr, .lm_rd_data, .lm_wr_en, .lm_wr_addr, .lm_wr_data,
    .eql_empty, .vql_empty
  );
  linked_list_memory u_llm (
    .clk, .rst, .rd_addr(lm_rd_addr), .rd_data(lm_rd_data),
    .wr_en(lm_wr_en), .wr_addr(lm_wr_addr), .wr_data(lm_wr_data)
  );

  int unsigned vq [N][$];
  int          nsched [N];
  bit          used [1:F];

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL cycle %0d: %s", cycles, msg);
  endtask

  function automatic int total();
    int t = 0;
    for (int j = 0; j < N; j++) t += vq[j].size();
    return t;
  endfunction

  initial begin
    int sj, cand [$];
    int arr_p_int;
    arr_valid = 0; arr_port = 0; dep_valid = 0; dep_port = 0; sched_q = 0;
    for (int j = 0; j < N; j++) nsched[j] = 0;
    for (int l = 1; l <= F; l++) used[l] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      // Phases of the run: heavy arrivals fill the buffer, then balanced.
      arr_valid = 1'($urandom_range(0, 99) < (((it / 200) % 2 == 0) ? 80 : 45));
      // Concentrate on few outputs so VQLs interact.
      arr_port  = 3'($urandom_range(0, 2) == 0 ? $urandom_range(0, 7) : $urandom_range(0, 1));
      cand.delete();
      for (int j = 0; j < N; j++) if (vq[j].size() > nsched[j]) cand.push_back(j);
      sched_q = '0;
      sj = -1;
      if (cand.size() > 0 && $urandom_range(0, 3) != 0) begin
        sj = cand[$urandom_range(0, cand.size() - 1)];
        sched_q[sj] = 1'b1;
      end
      cand.delete();
      for (int j = 0; j < N; j++) if (nsched[j] > 0) cand.push_back(j);
      dep_valid = 0;
      if (cand.size() > 0 && $urandom_range(0, 99) < 55) begin
        dep_valid = 1;
        dep_port  = 3'(cand[$urandom_range(0, cand.size() - 1)]);
      end
      #1;
      // Outputs before the edge.
      checks++;
      if (arr_ready !== (total() < F)) fail($sformatf("arr_ready %0b, %0d cells", arr_ready, total()));
      checks++;
      if (eql_empty !== (total() == F)) fail("eql_empty");
      for (int j = 0; j < N; j++) begin
        checks++;
        if (unsched[j] !== (vq[j].size() > nsched[j])) fail($sformatf("unsched[%0d]", j));
        checks++;
        if (vql_empty[j] !== (vq[j].size() == 0)) fail($sformatf("vql_empty[%0d]", j));
      end
      if (arr_valid && arr_ready) begin
        checks++;
        if (arr_addr == 0 || arr_addr > F || used[arr_addr]) fail($sformatf("bad arrival address %0d", arr_addr));
      end
      if (dep_valid) begin
        checks++;
        if (dep_addr !== PW'(vq[dep_port][0]))
          fail($sformatf("dep_addr %0d expected %0d", dep_addr, vq[dep_port][0]));
      end
      // Coverage.
      if (arr_valid && !arr_ready) n_full++;
      if (arr_valid && arr_ready && dep_valid && sj >= 0) n_three++;
      if (arr_valid && arr_ready && dep_valid && dep_port == arr_port) n_arr_dep_same++;
      if (arr_valid && arr_ready && sj == int'(arr_port)) n_arr_sched_same++;
      if (arr_valid && arr_ready && dep_valid && dep_port == arr_port && vq[dep_port].size() == 1) n_refill++;
      // Model update at the edge.
      arr_p_int = arr_port;
      @(posedge clk);
      if (dep_valid) begin
        used[vq[dep_port][0]] = 0;
        void'(vq[dep_port].pop_front());
        nsched[dep_port]--;
      end
      if (sj >= 0) nsched[sj]++;
      if (arr_valid && arr_ready) begin
        vq[arr_p_int].push_back(arr_addr);
        used[arr_addr] = 1;
      end
    end
    $display("coverage: full=%0d three_ops=%0d arr_dep_same=%0d arr_sched_same=%0d refill=%0d",
             n_full, n_three, n_arr_dep_same, n_arr_sched_same, n_refill);
    checks++;
    if (n_full == 0 || n_three == 0 || n_arr_dep_same == 0 || n_arr_sched_same == 0 || n_refill == 0)
      fail("a queue-manager situation was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
