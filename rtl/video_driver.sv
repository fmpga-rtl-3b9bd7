// video_driver: draws the settings page on a 128x64 monochrome LCD over SPI,
// generating every pixel on the fly instead of from a frame buffer.
//
// Screen layout. The top text row shows the page name at the left and the
// selected setting's name at the right, in a 5x7 font with 6-pixel character
// cells. Below, each setting of the page has a 32x24-pixel cell (four per row,
// two rows: pixel rows 16-39 and 40-63) holding a rectangle outline and a
// horizontal bar whose length shows the setting's 8-bit code (signed codes are
// shown offset so that 0 is mid-scale); the selected setting's rectangle is drawn
// twice as thick. Names come from small ROMs (page names, setting names, glyph
// columns); the rectangles and bars are computed from the pixel coordinates.
//
// Display protocol (ST7565-style controller): after a reset pulse on lcd_rst_n
// an initialisation command list is sent; then, for each of the eight 8-pixel
// display pages, the commands "page address", "column high", "column low" are
// followed by 128 data bytes (lcd_a0 = 1), each holding one column of 8 pixels,
// top pixel in bit 0. A frame is about 25,000 clocks (0.5 ms) and one starts
// every FRAME_CYCLES clocks (60 frames/s at 50 MHz). Bytes go out MSB first;
// lcd_sclk has a period of 3 clocks (16.7 MHz, high for 1) and the display takes
// lcd_si on the rising edge.
//
// From the document: the 128x64 SPI display, 16.7 MHz from 50 MHz, 60 frames/s,
// rendering without a frame buffer, the name ROMs, the page and parameter names in
// the top left and top right, a value indicator per parameter. This design's
// choices: the layout, font, names, the drawing of the rectangles by arithmetic
// rather than from ROMs, and the controller command values.
module video_driver #(
  parameter int unsigned FRAME_CYCLES = 833_333,
  parameter int unsigned RST_CYCLES   = 100
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       page,
  input  logic [2:0]       sel,
  input  logic [3:0]       page_len,
  input  logic [7:0][7:0]  page_codes,
  output logic             lcd_cs_n,
  output logic             lcd_rst_n,
  output logic             lcd_a0,
  output logic             lcd_sclk,
  output logic             lcd_si,
  output logic             frame_done   // one-cycle strobe after the last byte of a frame
);
  // ---- name ROMs (6 characters each) ---------------------------------------
  function automatic logic [47:0] page_name(logic [3:0] p);
    unique case (p)
      4'd0:    return "ENV 1 ";
      4'd1:    return "ENV 2 ";
      4'd2:    return "ENV 3 ";
      4'd3:    return "VOICE ";
      4'd4:    return "LFO   ";
      4'd5:    return "AMP   ";
      4'd6:    return "PITCH ";
      4'd7:    return "DIST K";
      default: return "DRYWET";
    endcase
  endfunction

  function automatic logic [47:0] param_name(logic [3:0] p, logic [2:0] s);
    if (p <= 4'd2) begin
      unique case (s)
        3'd0:    return "ATTACK";
        3'd1:    return " DECAY";
        3'd2:    return " SUSTN";
        default: return "RELEAS";
      endcase
    end else if (p == 4'd3) begin
      unique case (s)
        3'd0:    return "  WAVE";
        3'd1:    return "MODWAV";
        3'd2:    return "     K";
        default: return "   WET";
      endcase
    end else if (p == 4'd4) begin
      unique case (s)
        3'd0:    return "RATE 1";
        3'd1:    return "RATE 2";
        3'd2:    return "RATE 3";
        3'd3:    return "WAVE 1";
        3'd4:    return "WAVE 2";
        default: return "WAVE 3";
      endcase
    end else begin
      unique case (s)
        3'd0:    return " ENV 1";
        3'd1:    return " ENV 2";
        3'd2:    return " ENV 3";
        3'd3:    return " LFO 1";
        3'd4:    return " LFO 2";
        3'd5:    return " LFO 3";
        3'd6:    return " VELOC";
        default: return "MODWAV";
      endcase
    end
  endfunction

  // one 7-pixel column (bit 0 = top) of a 5x7 glyph
  function automatic logic [6:0] glyph_col(logic [7:0] ch, logic [2:0] c);
    logic [34:0] g;
    unique case (ch)
      "1": g = {7'h00, 7'h42, 7'h7F, 7'h40, 7'h00};
      "2": g = {7'h42, 7'h61, 7'h51, 7'h49, 7'h46};
      "3": g = {7'h21, 7'h41, 7'h45, 7'h4B, 7'h31};
      "A": g = {7'h7E, 7'h11, 7'h11, 7'h11, 7'h7E};
      "C": g = {7'h3E, 7'h41, 7'h41, 7'h41, 7'h22};
      "D": g = {7'h7F, 7'h41, 7'h41, 7'h22, 7'h1C};
      "E": g = {7'h7F, 7'h49, 7'h49, 7'h49, 7'h41};
      "F": g = {7'h7F, 7'h09, 7'h09, 7'h09, 7'h01};
      "H": g = {7'h7F, 7'h08, 7'h08, 7'h08, 7'h7F};
      "I": g = {7'h00, 7'h41, 7'h7F, 7'h41, 7'h00};
      "K": g = {7'h7F, 7'h08, 7'h14, 7'h22, 7'h41};
      "L": g = {7'h7F, 7'h40, 7'h40, 7'h40, 7'h40};
      "M": g = {7'h7F, 7'h02, 7'h0C, 7'h02, 7'h7F};
      "N": g = {7'h7F, 7'h04, 7'h08, 7'h10, 7'h7F};
      "O": g = {7'h3E, 7'h41, 7'h41, 7'h41, 7'h3E};
      "P": g = {7'h7F, 7'h09, 7'h09, 7'h09, 7'h06};
      "R": g = {7'h7F, 7'h09, 7'h19, 7'h29, 7'h46};
      "S": g = {7'h46, 7'h49, 7'h49, 7'h49, 7'h31};
      "T": g = {7'h01, 7'h01, 7'h7F, 7'h01, 7'h01};
      "U": g = {7'h3F, 7'h40, 7'h40, 7'h40, 7'h3F};
      "V": g = {7'h1F, 7'h20, 7'h40, 7'h20, 7'h1F};
      "W": g = {7'h3F, 7'h40, 7'h38, 7'h40, 7'h3F};
      "Y": g = {7'h07, 7'h08, 7'h70, 7'h08, 7'h07};
      default: g = '0;
    endcase
    return (c < 3'd5) ? g[34 - 7*c -: 7] : 7'h00;
  endfunction

  // ---- pixel column generator ------------------------------------------------
  // 8 vertical pixels of display page `band` at column `x`, bit 0 on top.
  function automatic logic [7:0] column_byte(
      logic [2:0] band, logic [6:0] x, logic [3:0] pg, logic [2:0] sl,
      logic [3:0] plen, logic [7:0][7:0] codes);
    logic [7:0]  b;
    logic [47:0] name;
    logic [2:0]  ci, cc;
    logic [6:0]  xr;
    logic [5:0]  y, top;
    logic [4:0]  cx;
    logic [1:0]  cell_col;
    logic        cell_row;
    logic [2:0]  idx;
    logic [7:0]  v;
    logic [5:0]  bar;
    logic [4:0]  dy;
    b = '0;
    if (band == 3'd0) begin
      if (x < 7'd36) begin
        name = page_name(pg);
        ci   = 3'(x / 7'd6);
        cc   = 3'(x % 7'd6);
        b    = {1'b0, glyph_col(name[47 - 8*ci -: 8], cc)};
      end else if (x >= 7'd92) begin
        name = param_name(pg, sl);
        xr   = x - 7'd92;
        ci   = 3'(xr / 7'd6);
        cc   = 3'(xr % 7'd6);
        b    = {1'b0, glyph_col(name[47 - 8*ci -: 8], cc)};
      end
    end else if (band >= 3'd2) begin
      cell_col = x[6:5];
      cx       = x[4:0];
      cell_row = (band >= 3'd5);
      idx      = {cell_row, cell_col};
      top      = cell_row ? 6'd40 : 6'd16;
      v        = codes[idx];
      if (pg >= 4'd5) v = v ^ 8'h80;                 // signed code, 0 at mid-scale
      bar      = 6'((13'(v) * 13'd26) >> 8);         // 0..25 pixels
      if (4'(idx) < plen) begin
        for (int j = 0; j < 8; j++) begin
          y  = {band, 3'(j)};
          dy = 5'(y - top);
          // outline: x 1..30, y 1..22 of the cell, thicker when selected
          if (((cx == 5'd1 || cx == 5'd30) && dy >= 5'd1 && dy <= 5'd22) ||
              ((dy == 5'd1 || dy == 5'd22) && cx >= 5'd1 && cx <= 5'd30))
            b[j] = 1'b1;
          if (idx == sl &&
              (((cx == 5'd2 || cx == 5'd29) && dy >= 5'd2 && dy <= 5'd21) ||
               ((dy == 5'd2 || dy == 5'd21) && cx >= 5'd2 && cx <= 5'd29)))
            b[j] = 1'b1;
          // value bar: rows 8..15, starting at x = 3
          if (dy >= 5'd8 && dy <= 5'd15 && cx >= 5'd3 && 6'(cx) < 6'd3 + bar)
            b[j] = 1'b1;
        end
      end
    end
    return b;
  endfunction

  // ---- byte sequencer ------------------------------------------------------
  localparam int NINIT = 9;
  function automatic logic [7:0] init_cmd(logic [3:0] i);
    unique case (i)
      4'd0:    return 8'hA2;   // LCD bias 1/9
      4'd1:    return 8'hA0;   // segment direction normal
      4'd2:    return 8'hC8;   // common direction reversed
      4'd3:    return 8'h40;   // display start line 0
      4'd4:    return 8'h2F;   // booster, regulator, follower on
      4'd5:    return 8'h26;   // regulator resistor ratio
      4'd6:    return 8'h81;   // electronic volume (contrast) ...
      4'd7:    return 8'h18;   // ... value
      default: return 8'hAF;   // display on
    endcase
  endfunction

  typedef enum logic [2:0] {V_RESET, V_INIT, V_PAGE_CMD, V_DATA, V_WAIT} vstate_e;
  vstate_e     vstate;
  logic [31:0] timer;        // reset length, then frame period
  logic [3:0]  init_idx;
  logic [2:0]  band;
  logic [1:0]  cmd_idx;
  logic [6:0]  col;
  logic        sent;         // frame_done already pulsed for this frame

  // byte shifter
  logic [7:0]  sh;
  logic [3:0]  bits_left;
  logic [1:0]  ph;
  logic        tx_busy;
  logic        load;
  logic [7:0]  load_byte;
  logic        load_a0;

  always_comb begin
    load      = 1'b0;
    load_byte = 8'h00;
    load_a0   = 1'b0;
    if (!tx_busy) begin
      unique case (vstate)
        V_INIT:     begin load = 1'b1; load_byte = init_cmd(init_idx); end
        V_PAGE_CMD: begin
          load = 1'b1;
          unique case (cmd_idx)
            2'd0:    load_byte = {5'b10110, band};   // page address
            2'd1:    load_byte = 8'h10;              // column address high = 0
            default: load_byte = 8'h00;              // column address low = 0
          endcase
        end
        V_DATA:     begin load = 1'b1; load_a0 = 1'b1;
                          load_byte = column_byte(band, col, page, sel, page_len, page_codes); end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vstate     <= V_RESET;
      timer      <= '0;
      init_idx   <= '0;
      band       <= '0;
      cmd_idx    <= '0;
      col        <= '0;
      frame_done <= 1'b0;
      sent       <= 1'b0;
      lcd_rst_n  <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      timer      <= timer + 1'b1;
      unique case (vstate)
        V_RESET: if (timer >= RST_CYCLES) begin
          lcd_rst_n <= 1'b1;
          if (timer >= 2 * RST_CYCLES) begin
            vstate   <= V_INIT;
            init_idx <= '0;
          end
        end
        V_INIT: if (load) begin
          if (init_idx == 4'(NINIT - 1)) begin
            vstate  <= V_PAGE_CMD;
            band    <= '0;
            cmd_idx <= '0;
            timer   <= '0;
          end else begin
            init_idx <= init_idx + 1'b1;
          end
        end
        V_PAGE_CMD: if (load) begin
          if (cmd_idx == 2'd2) begin
            vstate <= V_DATA;
            col    <= '0;
          end
          cmd_idx <= cmd_idx + 1'b1;
        end
        V_DATA: if (load) begin
          col <= col + 1'b1;
          if (col == 7'd127) begin
            cmd_idx <= '0;
            if (band == 3'd7) begin
              vstate <= V_WAIT;
              sent   <= 1'b0;
            end
            else begin
              band   <= band + 1'b1;
              vstate <= V_PAGE_CMD;
            end
          end
        end
        V_WAIT: begin
          if (!tx_busy && !sent) begin
            frame_done <= 1'b1;
            sent       <= 1'b1;
          end
          if (timer >= FRAME_CYCLES - 1) begin
            timer   <= '0;
            band    <= '0;
            cmd_idx <= '0;
            vstate  <= V_PAGE_CMD;
          end
        end
        default: vstate <= V_RESET;
      endcase
    end
  end

  // SPI shifter: 3 clocks per bit, sclk high in the last one
  always_ff @(posedge clk) begin
    if (rst) begin
      sh        <= '0;
      bits_left <= '0;
      ph        <= '0;
      lcd_cs_n  <= 1'b1;
      lcd_a0    <= 1'b0;
      lcd_sclk  <= 1'b0;
    end else if (load) begin
      sh        <= load_byte;
      bits_left <= 4'd8;
      ph        <= '0;
      lcd_cs_n  <= 1'b0;
      lcd_a0    <= load_a0;
      lcd_sclk  <= 1'b0;
    end else if (bits_left != '0) begin
      unique case (ph)
        2'd0: begin ph <= 2'd1; end
        2'd1: begin ph <= 2'd2; lcd_sclk <= 1'b1; end
        default: begin
          ph        <= 2'd0;
          lcd_sclk  <= 1'b0;
          bits_left <= bits_left - 1'b1;
          sh        <= {sh[6:0], 1'b0};
        end
      endcase
    end else begin
      lcd_cs_n <= 1'b1;
    end
  end

  assign tx_busy = (bits_left != '0);
  assign lcd_si  = sh[7];
endmodule
