// linked_list_memory_tb: checks the reset chain and random link updates.
//
// After reset location L must point to L+1 and location F to NULL (0).
// Then random writes (two ports, distinct addresses) are applied and a
// reference array in the testbench is compared with all three read ports,
// which are combinational. Address 0 must always read as NULL.
module linked_list_memory_tb;
  localparam int unsigned F  = 16;
  localparam int unsigned PW = 5;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic          clk = 0, rst = 1;
  logic [PW-1:0] rd_addr [3];
  logic [PW-1:0] rd_data [3];
  logic          wr_en   [2];
  logic [PW-1:0] wr_addr [2];
  logic [PW-1:0] wr_data [2];
  logic [PW-1:0] model [0:F];

  linked_list_memory dut (.clk, .rst, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a <= F; a += 3) begin
      for (int p = 0; p < 3; p++) rd_addr[p] = PW'((a + p) % (F + 1));
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rd_data[p] !== model[(a + p) % (F + 1)]) begin
          failures++;
          if (failures < 10)
            $display("FAIL port %0d addr %0d: got %0d expected %0d", p, (a + p) % (F + 1),
                     rd_data[p], model[(a + p) % (F + 1)]);
        end
      end
    end
  endtask

  initial begin
    for (int w = 0; w < 2; w++) begin wr_en[w] = 0; wr_addr[w] = 0; wr_data[w] = 0; end
    for (int p = 0; p < 3; p++) rd_addr[p] = 0;
    model[0] = 0;
    for (int l = 1; l <= F; l++) model[l] = (l == F) ? 0 : PW'(l + 1);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check_all();
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      wr_en[0]   = 1'($urandom_range(0, 1));
      wr_en[1]   = 1'($urandom_range(0, 1));
      wr_addr[0] = PW'($urandom_range(1, F));
      wr_addr[1] = PW'($urandom_range(1, F));
      if (wr_addr[1] == wr_addr[0]) wr_addr[1] = PW'((wr_addr[0] % F) + 1);
      wr_data[0] = PW'($urandom_range(0, F));
      wr_data[1] = PW'($urandom_range(0, F));
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (wr_en[w]) model[wr_addr[w]] = wr_data[w];
      #1;
      wr_en[0] = 0; wr_en[1] = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
