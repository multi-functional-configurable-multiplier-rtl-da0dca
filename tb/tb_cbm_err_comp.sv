// tb_cbm_err_comp: exhaustive check of the compensation value round(N/2),
// N = number of set non-zero-digit flags.
module tb_cbm_err_comp;
  logic [3:0] nz;
  logic [2:0] comp;
  int checks = 0, failures = 0;
  int n;
  logic clk = 0;
  always #5 clk = ~clk;

  cbm_err_comp #(.ROWS(4)) dut (.nz(nz), .comp(comp));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      nz = 4'(i);
      #1;
      n = $countones(nz);
      checks++;
      if (int'(comp) != (n + 1) / 2) begin
        failures++;
        $display("FAIL nz=%b comp=%0d expected %0d", nz, comp, (n + 1) / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
