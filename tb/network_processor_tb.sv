// network_processor_tb: packets in, tagged cells out.
//
// Random packets (1..16 cells, random destination) are offered while the
// cell side is randomly not ready (a full buffer), and the route table is
// rewritten between phases. Every cell must come out in order, carrying
// the output port the table held for the packet's destination when the
// packet was taken. With cell_ready held high, back-to-back packets must
// cost exactly one cycle per cell. Stalls and multi-cell packets must occur.
module network_processor_tb;
  localparam int unsigned W = 8, MC = 16, LW = 5, NW = 3;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_stall = 0, n_multi = 0;

  logic              clk = 0, rst = 1;
  logic              pkt_valid, pkt_ready, rt_wr_en, cell_valid, cell_ready;
  logic [31:0]       pkt_dst;
  logic [LW-1:0]     pkt_len;
  logic [MC*W-1:0]   pkt_data;
  logic [3:0]        rt_wr_addr;
  logic [NW-1:0]     rt_wr_port, cell_port;
  logic [W-1:0]      cell_data;
  logic [NW-1:0]     table_m [16];

  typedef struct { logic [NW-1:0] port; logic [W-1:0] data; } cell_t;
  cell_t exp_q [$];

  network_processor dut (
    .clk, .rst, .pkt_valid, .pkt_ready, .pkt_dst, .pkt_len, .pkt_data,
    .rt_wr_en, .rt_wr_addr, .rt_wr_port, .cell_valid, .cell_ready, .cell_port, .cell_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard on the cell side.
  always @(posedge clk) begin
    if (!rst && cell_valid && cell_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected cell");
      end else begin
        if (cell_port !== exp_q[0].port || cell_data !== exp_q[0].data) begin
          failures++;
          if (failures < 10)
            $display("FAIL cell: got %0d/%h expected %0d/%h", cell_port, cell_data,
                     exp_q[0].port, exp_q[0].data);
        end
        void'(exp_q.pop_front());
      end
    end
    if (!rst && cell_valid && !cell_ready) n_stall++;
  end

  task automatic send_packet(input int len);
    pkt_valid = 1;
    pkt_dst   = $urandom;
    pkt_len   = LW'(len);
    for (int k = 0; k < MC; k++) pkt_data[k*W +: W] = W'($urandom);
    do @(posedge clk); while (!pkt_ready);
    for (int k = 0; k < len; k++) begin
      cell_t c;
      c.port = table_m[pkt_dst[3:0]];
      c.data = pkt_data[k*W +: W];
      exp_q.push_back(c);
    end
    if (len > 1) n_multi++;
    #1 pkt_valid = 0;
  endtask

  initial begin
    int t0, ncells;
    pkt_valid = 0; pkt_dst = 0; pkt_len = 1; pkt_data = 0;
    rt_wr_en = 0; rt_wr_addr = 0; rt_wr_port = 0; cell_ready = 0;
    for (int a = 0; a < 16; a++) table_m[a] = NW'(a % 8);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int phase = 0; phase < 6; phase++) begin
      // Rewrite part of the route table (no packet in flight).
      wait (exp_q.size() == 0);
      @(negedge clk);
      for (int a = 0; a < 16; a++) begin
        if ($urandom_range(0, 1) == 1) begin
          rt_wr_en = 1; rt_wr_addr = 4'(a); rt_wr_port = NW'($urandom);
          @(posedge clk);
          table_m[a] = rt_wr_port;
          #1;
        end
      end
      rt_wr_en = 0;
      // Random readiness on the cell side.
      fork
        begin
          for (int n = 0; n < 20; n++) send_packet($urandom_range(1, MC));
        end
        begin
          while (exp_q.size() != 0 || pkt_valid) begin
            @(negedge clk);
            cell_ready = 1'($urandom_range(0, 2) != 0);
          end
        end
      join_any
      wait (exp_q.size() == 0);
      @(negedge clk);
      cell_ready = 0;
    end
    // Throughput: back-to-back packets with the cell side always ready.
    @(negedge clk);
    cell_ready = 1;
    t0 = cycles;
    ncells = 0;
    for (int n = 0; n < 10; n++) begin
      automatic int len = $urandom_range(1, MC);
      ncells += len;
      send_packet(len);
    end
    wait (exp_q.size() == 0);
    @(negedge clk);
    // One edge takes the first packet; from then on one cell leaves per
    // edge and each next packet is taken with its predecessor's last cell.
    checks++;
    if (cycles - t0 != ncells + 1) begin
      failures++;
      $display("FAIL throughput: %0d cells took %0d cycles", ncells, cycles - t0);
    end
    $display("coverage: stalls=%0d multi_cell_packets=%0d", n_stall, n_multi);
    checks++;
    if (n_stall == 0 || n_multi == 0) begin
      failures++;
      $display("FAIL stall or multi-cell packet never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
