// tb_fir_coef_mem: self-checking test of the filter coefficient memory.
//
// Writes random coefficients one at a time in random order, then reads every
// word and checks all lanes against a shadow copy, including the one-cycle
// read latency and that a write to one lane leaves the other lanes alone.
module tb_fir_coef_mem;

  localparam int unsigned CW = 18, M = 8, C = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]        rd_addr = '0;
  logic [M*CW-1:0]   rd_data;
  logic              we = 1'b0;
  logic [4:0]        wr_addr = '0;
  logic [2:0]        wr_lane = '0;
  logic signed [CW-1:0] wr_data = '0;

  fir_coef_mem dut (.clk, .rd_addr, .rd_data, .we, .wr_addr, .wr_lane, .wr_data);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [CW-1:0] shadow [C][M];

  task automatic read_all();
    for (int a = 0; a < int'(C); a++) begin
      @(negedge clk) rd_addr = 5'(a);
      @(posedge clk);
      #1;
      for (int m = 0; m < int'(M); m++)
        check(rd_data[m*CW +: CW] == shadow[a][m],
              $sformatf("word %0d lane %0d: got %h expected %h", a, m, rd_data[m*CW +: CW], shadow[a][m]));
    end
  endtask

  initial begin
    for (int a = 0; a < int'(C); a++)
      for (int m = 0; m < int'(M); m++) shadow[a][m] = '0;
    repeat (2) @(posedge clk);
    read_all();                       // powers up cleared
    for (int i = 0; i < 600; i++) begin
      int a, m;
      a = $urandom_range(C - 1);
      m = $urandom_range(M - 1);
      @(negedge clk);
      we = 1'b1; wr_addr = 5'(a); wr_lane = 3'(m); wr_data = CW'($urandom);
      shadow[a][m] = wr_data;
    end
    @(negedge clk) we = 1'b0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
