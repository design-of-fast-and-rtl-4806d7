// output_memory_tb: the schedule written in a slot is read back exactly one
// frame later, in the same slot.
//
// Random entries are written every slot for several frames while the slot
// counter runs 0..F-1. In each slot the read port must show what was
// written in that slot F cycles earlier (nothing valid in the first frame
// after reset).
module output_memory_tb;
  localparam int unsigned F = 16;
  localparam int unsigned N = 8;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic       clk = 0, rst = 1;
  logic [3:0] slot;
  logic       rd_valid, wr_en, wr_valid;
  logic [2:0] rd_port, wr_port;
  logic       mv [F];
  logic [2:0] mp [F];

  output_memory dut (.clk, .rst, .slot, .rd_valid, .rd_port, .wr_en, .wr_valid, .wr_port);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    slot = 0; wr_en = 0; wr_valid = 0; wr_port = 0;
    for (int t = 0; t < F; t++) begin mv[t] = 0; mp[t] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int it = 0; it < 8 * F; it++) begin
      @(negedge clk);
      slot     = 4'(it % F);
      wr_en    = 1'($urandom_range(0, 7) != 0);
      wr_valid = 1'($urandom_range(0, 1));
      wr_port  = 3'($urandom);
      #1;
      checks++;
      if (rd_valid !== mv[slot] || (mv[slot] && rd_port !== mp[slot])) begin
        failures++;
        if (failures < 10)
          $display("FAIL slot %0d: got %0b/%0d expected %0b/%0d", slot, rd_valid, rd_port,
                   mv[slot], mp[slot]);
      end
      @(posedge clk);
      if (wr_en) begin mv[slot] = wr_valid; mp[slot] = wr_port; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
