// tb_video_driver: decodes the SPI stream the video driver sends to the LCD
// (bytes sampled on rising lcd_sclk while lcd_cs_n is low, with lcd_a0) and
// rebuilds the 128x64 image the display would show. It checks the reset pulse,
// the initialisation commands, the page/column commands before each display
// page, 128 data bytes per page, the frame period, and pixels of the image:
// the first glyph columns of the page and setting names, the outline of an
// unselected and of the selected cell, the length of a value bar, and that a
// cell beyond the page's last setting stays empty. FRAME_CYCLES is shortened.
module tb_video_driver;
  logic clk = 0, rst = 1;
  logic [3:0] page = 4'd0, page_len = 4'd4;
  logic [2:0] sel = 3'd1;
  logic [7:0][7:0] page_codes;
  logic lcd_cs_n, lcd_rst_n, lcd_a0, lcd_sclk, lcd_si, frame_done;
  int checks = 0, failures = 0;

  localparam int FC = 40000;
  video_driver #(.FRAME_CYCLES(FC), .RST_CYCLES(20)) dut (.*);
  always #5 clk = ~clk;

  // SPI capture
  logic [7:0] sh;
  int nb = 0;
  logic sclk_q = 0;
  logic [7:0] bytes_q [$];
  logic       a0_q [$];
  int         t_q [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    sclk_q <= lcd_sclk;
    if (lcd_cs_n) nb = 0;
    else if (lcd_sclk && !sclk_q) begin
      sh = {sh[6:0], lcd_si}; nb++;
      if (nb == 8) begin bytes_q.push_back(sh); a0_q.push_back(lcd_a0); t_q.push_back(cyc); nb = 0; end
    end
  end

  int frames = 0;
  always @(posedge clk) if (!rst && frame_done) frames++;

  task automatic expect_eq(input string what, input int got, input int expv);
    checks++;
    if (got != expv) begin failures++; $display("FAIL %s = %0h expected %0h", what, got, expv); end
  endtask

  logic img [128][64];
  function automatic logic pix(int x, int y); return img[x][y]; endfunction

  initial begin
    logic [7:0] init [9] = '{8'hA2, 8'hA0, 8'hC8, 8'h40, 8'h2F, 8'h26, 8'h81, 8'h18, 8'hAF};
    int k, t_frame0, t_frame1;
    page_codes = '0;
    page_codes[0] = 8'd3; page_codes[1] = 8'd13; page_codes[2] = 8'd179; page_codes[3] = 8'd255;
    page_codes[4] = 8'd200;   // beyond page_len: not drawn
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    expect_eq("reset low", lcd_rst_n, 0);
    wait (frames == 2);
    repeat (50) @(posedge clk);
    // init commands
    for (k = 0; k < 9; k++) begin
      expect_eq("init cmd", bytes_q[k], init[k]);
      expect_eq("init a0", a0_q[k], 0);
    end
    // first frame
    for (int b = 0; b < 8; b++) begin
      expect_eq("page cmd", bytes_q[k], 8'hB0 | b);
      expect_eq("col hi", bytes_q[k+1], 8'h10);
      expect_eq("col lo", bytes_q[k+2], 8'h00);
      expect_eq("cmd a0", a0_q[k], 0);
      if (b == 0) t_frame0 = t_q[k];
      k += 3;
      for (int x = 0; x < 128; x++) begin
        if (a0_q[k] !== 1'b1) begin failures++; $display("FAIL data byte with a0 low"); end
        for (int j = 0; j < 8; j++) img[x][8*b + j] = bytes_q[k][j];
        k++;
      end
    end
    checks++;
    t_frame1 = t_q[k];
    expect_eq("second frame starts", bytes_q[k], 8'hB0);
    checks++;
    if (t_frame1 - t_frame0 < FC - 30 || t_frame1 - t_frame0 > FC + 30) begin
      failures++; $display("FAIL frame period %0d", t_frame1 - t_frame0);
    end
    // page name "ENV 1": 'E' columns 7F 49 ...
    expect_eq("E col0", {pix(0,6),pix(0,5),pix(0,4),pix(0,3),pix(0,2),pix(0,1),pix(0,0)}, 7'h7F);
    expect_eq("E col1", {pix(1,6),pix(1,5),pix(1,4),pix(1,3),pix(1,2),pix(1,1),pix(1,0)}, 7'h49);
    expect_eq("gap col5", pix(5,0) | pix(5,3) | pix(5,6), 0);
    // setting name " DECAY" (sel = 1): x = 92..97 blank, 'D' at 98
    expect_eq("D col0", {pix(98,6),pix(98,5),pix(98,4),pix(98,3),pix(98,2),pix(98,1),pix(98,0)}, 7'h7F);
    expect_eq("D col1", {pix(99,6),pix(99,5),pix(99,4),pix(99,3),pix(99,2),pix(99,1),pix(99,0)}, 7'h41);
    expect_eq("blank", pix(93,3), 0);
    // cell 0 (x 0..31, y 16..39): outline at x=1, y 17..38; not selected -> x=2 clear
    expect_eq("cell0 left", pix(1,17) & pix(1,30) & pix(1,38), 1);
    expect_eq("cell0 top", pix(10,17) & pix(30,17), 1);
    expect_eq("cell0 inner", pix(2,30), 0);
    // cell 1 selected: inner outline at x=34
    expect_eq("cell1 double", pix(33,30) & pix(34,30), 1);
    // cell 2 sustain code 179 -> bar (179*26)>>8 = 18 pixels from x=64+3
    expect_eq("bar start", pix(67,24) & pix(67,31), 1);
    expect_eq("bar end", pix(84,28), 1);
    expect_eq("bar past end", pix(85,28), 0);
    expect_eq("bar row above", pix(70,23), 0);
    // cell 0 code 3 -> no bar
    expect_eq("no bar", pix(3,28), 0);
    // cell 4 (lower row) beyond page_len: empty
    expect_eq("cell4 empty", pix(1,50) | pix(10,41), 0);
    // row 8..15 blank
    expect_eq("blank band", pix(40,10) | pix(100,12), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * FC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
