// tb_dsipm_matrix: a 4 x 6 matrix. Programs every pixel's enables through the
// address decoder (one pixel left fully masked, one with a single SPAD),
// fires SPADs and the inject line, and checks the column hit lines, the row
// lines of each sending column and the per-column reset against a model.
`timescale 1ns/1ps
module tb_dsipm_matrix;
  localparam int NC = 4, NR = 6, NS = 9;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [NC-1:0][NR-1:0][NS-1:0] fire = '0;
  logic inject = 0, cfg_we = 0;
  logic [3:0] cfg_x = '0;
  logic [5:0] cfg_y = '0;
  logic [8:0] cfg_en = '0;
  logic [NC-1:0] col_reset = '0, col_send = '0, col_hit;
  logic [NR-1:0] row_hit;
  bit model [NC][NR];

  always #10 clk = ~clk;

  dsipm_matrix #(.NCOL(NC), .NROW(NR), .NSPAD(NS)) dut (
    .clk (clk), .spad_fire (fire), .inject (inject), .cfg_we (cfg_we), .cfg_x (cfg_x),
    .cfg_y (cfg_y), .cfg_en (cfg_en), .col_reset (col_reset), .col_send (col_send),
    .col_hit (col_hit), .row_hit (row_hit)
  );

  function automatic logic [8:0] en_of(int x, int y);
    if (x == 2 && y == 3) return 9'h000;
    if (x == 1 && y == 5) return 9'h002;
    return 9'h1FF;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic compare(input string what);
    #1;
    for (int x = 0; x < NC; x++) begin
      bit any = 0;
      for (int y = 0; y < NR; y++) any |= model[x][y];
      check(col_hit[x] == any, $sformatf("%s col_hit[%0d]", what, x));
      col_send = '0;
      col_send[x] = 1'b1;
      #1;
      for (int y = 0; y < NR; y++)
        check(row_hit[y] == model[x][y], $sformatf("%s row_hit[%0d] col %0d", what, y, x));
      col_send = '0;
      #1;
      check(row_hit == '0, $sformatf("%s no row without send", what));
    end
  endtask

  task automatic reset_all();
    col_reset = '1;
    #2 col_reset = '0;
    foreach (model[x, y]) model[x][y] = 0;
  endtask

  initial begin
    for (int x = 0; x < NC; x++)
      for (int y = 0; y < NR; y++) begin
        @(negedge clk);
        cfg_we = 1; cfg_x = 4'(x); cfg_y = 6'(y); cfg_en = en_of(x, y);
      end
    @(negedge clk) cfg_we = 0;
    reset_all();
    compare("after reset");
    // SPAD 0 of several pixels: masked ones stay quiet
    for (int n = 0; n < 40; n++) begin
      automatic int x = $urandom_range(NC - 1);
      automatic int y = $urandom_range(NR - 1);
      automatic int s = $urandom_range(NS - 1);
      #2 fire[x][y][s] = 1;
      #2 fire[x][y][s] = 0;
      if (en_of(x, y)[s]) model[x][y] = 1;
      if (n % 8 == 7) begin
        compare("random hits");
        // clear one column, then all
        col_reset[n % NC] = 1;
        #2 col_reset = '0;
        for (int y2 = 0; y2 < NR; y2++) model[n % NC][y2] = 0;
        compare("one column cleared");
        reset_all();
      end
    end
    // inject reaches every pixel with an enabled SPAD
    #2 inject = 1;
    #2 inject = 0;
    foreach (model[x, y]) model[x][y] = (en_of(x, y) != 0);
    compare("inject");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
