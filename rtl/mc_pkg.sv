// mc_pkg: types and constants shared by the motion-compensation engine and the
// SDRAM memory controller.
//
// Motion vectors are quarter-pel for luma, signed, 10 bits per component, which
// is the interpolation search range [-128, +127.75]; an MV pair is 20 bits, the
// size of one stored co-located MV.  Picture order counts are 16-bit signed.  The SDRAM geometry
// defaults to a 512K x 32 x 4-bank part (2048 rows x 256 columns per bank).
package mc_pkg;

  localparam int unsigned MV_W    = 10;  // one MV component, quarter-pel: [-128, +127.75]
  localparam int unsigned POC_W   = 16;
  localparam int unsigned PIX_W   = 8;
  localparam int unsigned WORD_W  = 32;  // external data bus: 4 pixels

  typedef logic signed [MV_W-1:0] mvc_t;

  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

  // Macroblock partition types handled by the MV predictor.
  typedef enum logic [2:0] {
    MB_16X16 = 3'd0,
    MB_16X8  = 3'd1,
    MB_8X16  = 3'd2,
    MB_8X8   = 3'd3,
    MB_4X4   = 3'd4
  } part_t;

  // How a motion vector is produced.
  typedef enum logic [1:0] {
    MVM_MVP      = 2'd0,  // MVP + MVD
    MVM_SPATIAL  = 2'd1,  // spatial direct: MVP without MVD
    MVM_TEMPORAL = 2'd2   // temporal direct: scaled co-located MV
  } mvmode_t;

  // Weighted prediction mode.
  typedef enum logic [1:0] {
    WP_DEFAULT  = 2'd0,
    WP_EXPLICIT = 2'd1,
    WP_IMPLICIT = 2'd2
  } wpmode_t;

  // SDRAM commands (encoding of {cs_n, ras_n, cas_n, we_n} is left to the pad side).
  typedef enum logic [2:0] {
    SD_NOP  = 3'd0,
    SD_PRE  = 3'd1,
    SD_ACT  = 3'd2,
    SD_READ = 3'd3,
    SD_WRIT = 3'd4
  } sdcmd_t;

  // Access status detected by the address queue (Sec. on access latency).
  typedef enum logic [1:0] {
    ST_BANKHIT_ROWHIT   = 2'd0,
    ST_BANKHIT_ROWMISS  = 2'd1,
    ST_BANKMISS_ROWHIT  = 2'd2,
    ST_BANKMISS_ROWMISS = 2'd3
  } acc_status_t;

  // Data types stored in the SDRAM.
  typedef enum logic [1:0] {
    DT_MV     = 2'd0,  // co-located motion vector (20 bits in one column)
    DT_LUMA   = 2'd1,
    DT_CHROMA = 2'd2
  } dtype_t;

  function automatic mvc_t med3(input mvc_t a, input mvc_t b, input mvc_t c);
    mvc_t mx, mn;
    mx = (a > b) ? a : b;  mx = (mx > c) ? mx : c;
    mn = (a < b) ? a : b;  mn = (mn < c) ? mn : c;
    return mvc_t'(a + b + c - mx - mn);
  endfunction

  function automatic logic [PIX_W-1:0] clip1(input logic signed [31:0] v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
