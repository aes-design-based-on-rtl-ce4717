// Test of the SDRR: random input data, random data and a random select in
// every cycle; the output must equal the selected value of two cycles
// earlier (two cascaded registers). Counts cycles that selected the input
// data and cycles that selected the random data; each must occur.
module tb_sdrr;
  localparam int W = 128;
  logic clk = 0, sel;
  logic [W-1:0] data_in, rand_in, q;
  logic [W-1:0] hist [2];
  int checks = 0, failures = 0, n_data = 0, n_rand = 0;

  sdrr #(.WIDTH(W)) dut (.clk, .sel, .data_in, .rand_in, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("FAIL cycle %0d: q=%h expected %h", i, q, hist[1]);
        end
      end
      sel     = 1'($urandom);
      data_in = {$urandom, $urandom, $urandom, $urandom};
      rand_in = {$urandom, $urandom, $urandom, $urandom};
      if (sel) n_rand++; else n_data++;
      hist[1] = hist[0];
      hist[0] = sel ? rand_in : data_in;
    end
    checks += 2;
    if (n_data == 0) failures++;
    if (n_rand == 0) failures++;
    $display("input-data cycles %0d, random-data cycles %0d", n_data, n_rand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
