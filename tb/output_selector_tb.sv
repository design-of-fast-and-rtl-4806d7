// output_selector_tb: exhaustive check of the recursive output selector.
//
// For N = 8 (the default) and N = 2 and N = 16, every request vector is
// applied with the enable high and low. Expected: with e high, q is the
// lowest set bit of r (computed here by a plain loop); with e low, q is 0;
// c is the OR of r.
module output_selector_tb;
  int checks = 0, failures = 0;

  logic        e8;  logic [7:0]  r8,  q8;  logic c8;
  logic        e2;  logic [1:0]  r2,  q2;  logic c2;
  logic        e16; logic [15:0] r16, q16; logic c16;

  output_selector              dut8  (.e(e8),  .r(r8),  .q(q8),  .c(c8));
  output_selector #(.N(2))     dut2  (.e(e2),  .r(r2),  .q(q2),  .c(c2));
  output_selector #(.N(16))    dut16 (.e(e16), .r(r16), .q(q16), .c(c16));

  function automatic logic [15:0] first_set(input logic [15:0] r, input logic e);
    first_set = '0;
    if (e)
      for (int j = 0; j < 16; j++)
        if (r[j]) begin
          first_set[j] = 1'b1;
          break;
        end
  endfunction

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ev = 0; ev < 2; ev++) begin
      for (int v = 0; v < 256; v++) begin
        e8 = ev[0]; r8 = v[7:0];
        #1;
        check("q8", 16'(q8), first_set(16'(r8), e8));
        check("c8", 16'(c8), 16'(|r8));
      end
      for (int v = 0; v < 4; v++) begin
        e2 = ev[0]; r2 = v[1:0];
        #1;
        check("q2", 16'(q2), first_set(16'(r2), e2));
        check("c2", 16'(c2), 16'(|r2));
      end
      for (int v = 0; v < 65536; v += 7) begin
        e16 = ev[0]; r16 = v[15:0];
        #1;
        check("q16", q16, first_set(r16, e16));
        check("c16", 16'(c16), 16'(|r16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
