// Test of the four 15-bit buffers: reset, one write per cycle to any of
// R0..R3, truncation to 15 bits, and reads of all four at once, against a
// model array.
module tb_reg_file;
  import intra_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, we;
  logic [1:0] waddr;
  cou_t wdata;
  reg_t r [4];
  int model [4];
  int checks = 0, failures = 0;

  reg_file dut (.*);

  task automatic compare(string what);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (int'(r[i]) != model[i]) begin
        failures++;
        $display("FAIL %s R%0d: got %0d exp %0d", what, i, r[i], model[i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdata = '0;
    for (int i = 0; i < 4; i++) model[i] = 0;
    @(negedge clk); @(negedge clk);
    compare("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int v;
      we = 1'($urandom_range(0, 3) != 0);
      waddr = 2'($urandom_range(0, 3));
      v = $signed($urandom_range(0, 60000)) - 30000;
      wdata = cou_t'(v);
      @(negedge clk);
      if (we) begin
        // 15-bit signed truncation
        model[waddr] = int'(reg_t'(v));
      end
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
