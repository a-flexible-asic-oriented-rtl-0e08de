// tb_poly_ram: random writes and reads against a model array; checks the
// one-cycle read latency and read-before-write on a same-address collision.
module tb_poly_ram;
  localparam int DEPTH = 677, WIDTH = 11, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  poly_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int model[DEPTH];
  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = AW'(i); wr_data = WIDTH'(i * 7 + 3); model[i] = (i * 7 + 3) % (1 << WIDTH);
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      int ra, wa, wd, exp_v;
      bit we;
      ra = $urandom_range(0, DEPTH - 1);
      wa = (t % 5 == 0) ? ra : $urandom_range(0, DEPTH - 1);
      wd = $urandom_range(0, (1 << WIDTH) - 1);
      we = 1'($urandom);
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(ra); wr_en = we; wr_addr = AW'(wa); wr_data = WIDTH'(wd);
      exp_v = model[ra];
      if (we) model[wa] = wd;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data != WIDTH'(exp_v)) begin failures++; $display("addr %0d got %0d exp %0d", ra, rd_data, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
