// mcags: multiple-channel address generator and scheduler.
//
// Connects the three decoder units that use the frame memory, each on its own
// channel, and produces the logical addresses of their accesses:
//   channel 0  direct coding  read/write  co-located motion vectors (MV addresses:
//                                         MB column, MB row, 8x8 block index)
//   channel 1  interpolation  read        reference pixels (pixel addresses)
//   channel 2  de-blocking    write       reconstructed pixels (pixel addresses)
// Channel 1 takes a whole window request (first column x, top row y, number of
// columns, words per column) and generates its word addresses itself in the
// order the interpolator consumes them: column by column, each column top word
// first, one address per cycle.  Channels 0 and 2 pass one word access per
// request, with the write data.
// Scheduling between the channels is fixed priority, channel 1 > channel 0 >
// channel 2: the interpolator is the unit that waits for its data, the others
// do not.  One access per cycle goes out; a write also pushes its data word
// into the write data buffer.  The channel number is the access's tag, used to
// return read data to its channel.
//
// Timing: an access is offered on out_valid and leaves when out_ready (command
// queue not full and, for a write, write buffer not full).  A channel-1 window
// request is acknowledged (c1_ready) when its generator is idle.
// The three channels, their roles, the two address kinds and address generation
// in the unit's output order follow the design; the priority order and the
// window-request form of channel 1 are this module's choices.
module mcags
  import mc_pkg::*;
#(
  parameter int unsigned FI_W = 5
)(
  input  logic              clk,
  input  logic              rst_n,
  // channel 0: direct coding (co-located MV read/write)
  input  logic              c0_valid,
  output logic              c0_ready,
  input  logic              c0_we,
  input  logic [FI_W-1:0]   c0_frame,
  input  logic [11:0]       c0_mbx,
  input  logic [11:0]       c0_mby,
  input  logic [1:0]        c0_mvk,
  input  logic [WORD_W-1:0] c0_wdata,
  // channel 1: interpolation window read
  input  logic              c1_valid,
  output logic              c1_ready,
  input  logic [FI_W-1:0]   c1_frame,
  input  logic              c1_chroma,
  input  logic              c1_comp,
  input  logic [11:0]       c1_x,
  input  logic [11:0]       c1_y,       // multiple of 4
  input  logic [4:0]        c1_ncols,
  input  logic [1:0]        c1_nwords,
  output logic              c1_busy,
  // channel 2: de-blocking write
  input  logic              c2_valid,
  output logic              c2_ready,
  input  logic [FI_W-1:0]   c2_frame,
  input  logic              c2_chroma,
  input  logic              c2_comp,
  input  logic [11:0]       c2_x,
  input  logic [11:0]       c2_y,
  input  logic [WORD_W-1:0] c2_wdata,
  // logical access out (to the address translator and command queue)
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_we,
  output logic [1:0]        out_tag,
  output dtype_t            out_dtype,
  output logic [FI_W-1:0]   out_frame,
  output logic [11:0]       out_x,
  output logic [11:0]       out_y,
  output logic              out_comp,
  output logic [1:0]        out_mvk,
  output logic [WORD_W-1:0] out_wdata
);

  // channel-1 window generator
  logic            g_busy, g_chroma, g_comp;
  logic [FI_W-1:0] g_frame;
  logic [11:0]     g_x, g_y;
  logic [4:0]      g_ncols, g_col;
  logic [1:0]      g_nwords, g_w;

  assign c1_ready = !g_busy;
  assign c1_busy  = g_busy;

  logic [1:0] sel;   // 1, 0, 2 or 3 = none
  always_comb begin
    if (g_busy)        sel = 2'd1;
    else if (c0_valid) sel = 2'd0;
    else if (c2_valid) sel = 2'd2;
    else               sel = 2'd3;
  end

  always_comb begin
    out_valid = (sel != 2'd3);
    out_tag   = sel;
    out_we    = 1'b0;
    out_dtype = DT_LUMA;
    out_frame = '0;
    out_x     = '0;
    out_y     = '0;
    out_comp  = 1'b0;
    out_mvk   = '0;
    out_wdata = '0;
    unique case (sel)
      2'd1: begin
        out_dtype = g_chroma ? DT_CHROMA : DT_LUMA;
        out_frame = g_frame;
        out_x     = g_x + 12'(g_col);
        out_y     = g_y + {8'd0, g_w, 2'b00};
        out_comp  = g_comp;
      end
      2'd0: begin
        out_we    = c0_we;
        out_dtype = DT_MV;
        out_frame = c0_frame;
        out_x     = c0_mbx;
        out_y     = c0_mby;
        out_mvk   = c0_mvk;
        out_wdata = c0_wdata;
      end
      2'd2: begin
        out_we    = 1'b1;
        out_dtype = c2_chroma ? DT_CHROMA : DT_LUMA;
        out_frame = c2_frame;
        out_x     = c2_x;
        out_y     = c2_y;
        out_comp  = c2_comp;
        out_wdata = c2_wdata;
      end
      default: ;
    endcase
  end

  assign c0_ready = (sel == 2'd0) && out_ready;
  assign c2_ready = (sel == 2'd2) && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_busy <= 1'b0; g_chroma <= 1'b0; g_comp <= 1'b0; g_frame <= '0;
      g_x <= '0; g_y <= '0; g_ncols <= '0; g_col <= '0; g_nwords <= '0; g_w <= '0;
    end else if (!g_busy) begin
      if (c1_valid && c1_ncols != 5'd0 && c1_nwords != 2'd0) begin
        g_busy   <= 1'b1;
        g_chroma <= c1_chroma;
        g_comp   <= c1_comp;
        g_frame  <= c1_frame;
        g_x      <= c1_x;
        g_y      <= c1_y;
        g_ncols  <= c1_ncols;
        g_nwords <= c1_nwords;
        g_col    <= '0;
        g_w      <= '0;
      end
    end else if (out_ready) begin
      if (g_w + 2'd1 < g_nwords) g_w <= g_w + 2'd1;
      else begin
        g_w <= '0;
        if (g_col + 5'd1 < g_ncols) g_col <= g_col + 5'd1;
        else g_busy <= 1'b0;
      end
    end
  end

endmodule
