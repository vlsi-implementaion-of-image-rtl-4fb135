// tb_image_rom: checks the image store at its full 16,384-pixel size.
// A pseudo-random image (pixel n = low byte of n * 37 + 11, xor the high
// byte of n) is written through the load port. After a start pulse every
// address must come out once, in order, one per clock with no gaps, the
// first pixel two clocks after start, with the right index and value;
// busy must then fall. A start pulse during streaming must be ignored.
// A second run after overwriting a few pixels must show the new values.
module tb_image_rom;
  localparam int DEPTH = 16384;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, start = 1'b0;
  logic [13:0] wr_addr = '0, pix_index;
  logic [7:0]  wr_data = '0, inn;
  logic busy, pix_valid;
  int checks = 0, failures = 0;

  image_rom dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr),
                 .wr_data(wr_data), .start(start), .busy(busy),
                 .pix_valid(pix_valid), .pix_index(pix_index), .inn(inn));

  always #5 clk = ~clk;

  function automatic logic [7:0] img(input int n, input int run);
    logic [7:0] v = 8'((n * 37 + 11) ^ (n >> 8));
    if (run == 1 && n % 1000 == 3) v = ~v;
    return v;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(input int run);
    int got = 0, first_at = -1, cyc = 0;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (got < DEPTH && cyc < DEPTH + 10) begin
      @(posedge clk); #1;
      cyc++;
      if (cyc == 100) start <= 1'b1;       // must be ignored while busy
      if (cyc == 101) start <= 1'b0;
      if (pix_valid) begin
        if (first_at < 0) first_at = cyc;
        checks++;
        if (pix_index !== 14'(got) || inn !== img(got, run)) begin
          failures++;
          if (failures < 10)
            $display("FAIL run %0d pixel %0d: index=%0d inn=%h exp=%h",
                     run, got, pix_index, inn, img(got, run));
        end
        got++;
      end
    end
    checks++;
    if (first_at != 1 || cyc != DEPTH) begin
      failures++;
      $display("FAIL run %0d timing: first pixel at %0d, last at %0d (exp 1, %0d)",
               run, first_at, cyc, DEPTH);
    end
    @(posedge clk); #1;
    checks++;
    if (busy !== 1'b0 || pix_valid !== 1'b0) begin
      failures++;
      $display("FAIL run %0d: still busy after the last pixel", run);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < DEPTH; n++) begin
      wr_en   <= 1'b1;
      wr_addr <= 14'(n);
      wr_data <= img(n, 0);
      @(posedge clk);
    end
    wr_en <= 1'b0;
    @(posedge clk);
    run_stream(0);
    for (int n = 3; n < DEPTH; n += 1000) begin
      wr_en   <= 1'b1;
      wr_addr <= 14'(n);
      wr_data <= img(n, 1);
      @(posedge clk);
    end
    wr_en <= 1'b0;
    repeat (3) @(posedge clk);
    run_stream(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
