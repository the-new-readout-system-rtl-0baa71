// tb_choke_error: walks two fill levels up and down and checks CHOKE against
// a reference with the same high and low water marks (hysteresis), and
// ERROR being set by an error pulse and held until err_clear.
module tb_choke_error;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0][7:0] level, high_mark, low_mark;
  logic err_in = 0, err_clear = 0, choke, error;
  logic ref_choke = 0, ref_err = 0;
  int n_on = 0;

  choke_error #(.NLEV(2), .LW(8)) dut (.*);

  initial begin
    high_mark = {8'd96, 8'd12};
    low_mark  = {8'd32, 8'd4};
    level = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      // slow random walk of both levels
      for (int i = 0; i < 2; i++) begin
        int l;
        l = int'(level[i]) + $urandom_range(0, 2) - 1;
        if (l < 0) l = 0;
        if (l > (i ? 128 : 16)) l = i ? 128 : 16;
        level[i] = 8'(l);
      end
      err_in = ($urandom_range(0, 400) == 0);
      err_clear = ($urandom_range(0, 300) == 0);
      // reference, computed on the values the block sees at the next edge
      if (level[0] >= 12 || level[1] >= 96) ref_choke = 1;
      else if (level[0] <= 4 && level[1] <= 32) ref_choke = 0;
      if (err_in) ref_err = 1; else if (err_clear) ref_err = 0;
      @(negedge clk);
      checks++;
      if (choke != ref_choke || error != ref_err) begin
        failures++;
        $display("t=%0d choke %b/%b error %b/%b", t, choke, ref_choke, error, ref_err);
      end
      if (choke) n_on++;
    end
    checks++;
    if (n_on == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
