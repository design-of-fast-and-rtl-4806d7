// data_memory_tb: random writes and reads against a reference array.
//
// Every location is first written, then random reads and writes run,
// sometimes to the same location in the same cycle (the read must return
// the old cell). A read issued in one cycle must show rd_valid and its cell
// in the next cycle, and rd_valid must be low after a cycle without a read.
module data_memory_tb;
  localparam int unsigned F  = 16;
  localparam int unsigned W  = 8;
  localparam int unsigned PW = 5;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic          clk = 0, rst = 1;
  logic          wr_en, rd_en, rd_valid;
  logic [PW-1:0] wr_addr, rd_addr;
  logic [W-1:0]  wr_data, rd_data;
  logic [W-1:0]  model [1:F];
  logic [W-1:0]  expect_data;
  logic          expect_valid;

  data_memory dut (.clk, .rst, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_valid, .rd_data);

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
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int l = 1; l <= F; l++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = PW'(l); wr_data = W'($urandom);
      @(posedge clk);
      model[l] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      rd_en   = 1'($urandom_range(0, 3) != 0);
      rd_addr = PW'($urandom_range(1, F));
      wr_en   = 1'($urandom_range(0, 1));
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : PW'($urandom_range(1, F));
      wr_data = W'($urandom);
      expect_valid = rd_en;
      expect_data  = model[rd_addr];
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_valid !== expect_valid) begin
        failures++;
        $display("FAIL rd_valid %0b expected %0b", rd_valid, expect_valid);
      end
      if (expect_valid) begin
        checks++;
        if (rd_data !== expect_data) begin
          failures++;
          if (failures < 10) $display("FAIL read: got %h expected %h", rd_data, expect_data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
