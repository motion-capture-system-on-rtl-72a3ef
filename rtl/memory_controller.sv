// memory_controller: owns the ZBT frame buffer.
//
// CLEAR: every word of the visible screen (V_ACTIVE rows of H_WORDS words,
// addressed {row, column}) is written with two black pixels at the far depth.
// WAIT: after at least one vertical sync and with draw_en (a debug switch)
// set, it moves on. WRITE: for each pixel from the pixel buffer the word is
// read, and if the new depth is smaller than the stored depth of that half
// the word is written back with the half replaced (depth test). When the
// drawer reports all_drawn and the buffer is empty it enters READ for good
// and the display's address drives the memory; 'redraw' returns to CLEAR.
// This sequence follows the design; the depth test, which the design intended
// but did not finish, is included. Read data arrives RD_LAT clocks after the
// address.
//
// Timing: CLEAR takes H_WORDS*V_ACTIVE clocks; WRITE takes RD_LAT+2 clocks
// per pixel.
module memory_controller
  import mocap_pkg::*;
#(
  parameter int H_WORDS  = 400,
  parameter int V_ACTIVE = 600,
  parameter int RD_LAT   = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vsync,
  input  logic        draw_en,
  input  logic        redraw,
  input  logic        all_drawn,
  // from the pixel buffer
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [18:0] pix_addr,
  input  logic        pix_sel,
  input  pix_word_t   pix_word,
  // from the display
  input  logic [18:0] disp_addr,
  output logic        read_mode,
  // ZBT port
  output logic [18:0] zbt_addr,
  output logic        zbt_we,
  output logic [35:0] zbt_wdata,
  input  logic [35:0] zbt_rdata,
  // statistics
  output logic [31:0] n_written,
  output logic [31:0] n_rejected
);
  typedef enum logic [2:0] {CLEAR, WAIT, WRITE, RDWAIT, MODIFY, READ} st_t;
  st_t st;
  logic [9:0]  row;
  logic [8:0]  col;
  logic        vs_d, vs_seen;
  logic [18:0] a_r;
  logic        sel_r;
  pix_word_t   w_r, old_half;
  logic [2:0]  lat;
  localparam pix_word_t CLEAR_HALF = '{zero: 1'b0, color: 2'd0, shade: 4'd0, depth: 11'h7FF};

  assign read_mode = (st == READ);
  assign pix_ready = (st == WRITE) && pix_valid;
  assign old_half  = sel_r ? pix_word_t'(zbt_rdata[35:18]) : pix_word_t'(zbt_rdata[17:0]);

  always_comb begin
    zbt_we    = 1'b0;
    zbt_addr  = a_r;
    zbt_wdata = {CLEAR_HALF, CLEAR_HALF};
    unique case (st)
      CLEAR: begin
        zbt_we   = 1'b1;
        zbt_addr = {row, col};
      end
      WRITE:  zbt_addr = pix_addr;
      MODIFY: begin
        zbt_we    = (w_r.depth < old_half.depth);
        zbt_wdata = sel_r ? {w_r, zbt_rdata[17:0]} : {zbt_rdata[35:18], w_r};
      end
      READ:    zbt_addr = disp_addr;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= CLEAR;
      row        <= '0;
      col        <= '0;
      vs_d       <= 1'b0;
      vs_seen    <= 1'b0;
      a_r        <= '0;
      sel_r      <= 1'b0;
      w_r        <= '0;
      lat        <= '0;
      n_written  <= '0;
      n_rejected <= '0;
    end else begin
      vs_d <= vsync;
      unique case (st)
        CLEAR: begin
          if (col == 9'(H_WORDS - 1)) begin
            col <= '0;
            if (row == 10'(V_ACTIVE - 1)) begin
              row     <= '0;
              vs_seen <= 1'b0;
              st      <= WAIT;
            end else row <= row + 1'b1;
          end else col <= col + 1'b1;
        end
        WAIT: begin
          if (vsync && !vs_d) vs_seen <= 1'b1;
          if (vs_seen && draw_en) st <= WRITE;
        end
        WRITE: begin
          if (pix_valid) begin
            a_r   <= pix_addr;
            sel_r <= pix_sel;
            w_r   <= pix_word;
            lat   <= 3'(RD_LAT - 1);
            st    <= RDWAIT;
          end else if (all_drawn) begin
            st <= READ;
          end
        end
        RDWAIT: begin
          if (lat == '0) st <= MODIFY;
          else lat <= lat - 1'b1;
        end
        MODIFY: begin
          if (w_r.depth < old_half.depth) n_written <= n_written + 1'b1;
          else                            n_rejected <= n_rejected + 1'b1;
          st <= WRITE;
        end
        READ: if (redraw) st <= CLEAR;
        default: st <= CLEAR;
      endcase
      if (redraw && st != READ) st <= CLEAR;
    end
  end
endmodule
