// timing_unit: scalable timing unit of the SDRAM memory controller.
//
// Holds the SDRAM latencies the bank controllers and the scheduler count with:
// tRP (PRECHARGE period), tRCD (ACTIVE to READ/WRITE), CAS latency, burst
// length and write recovery tWR.  They are loaded by the user at initial setup
// (cfg_we) and keep their values afterwards, so one controller serves parts and
// clock rates with different latencies without changing its FSMs.  It also
// derives the two latencies the bank FSMs need after a column command: the
// earliest precharge after a read (BL) and after a write (BL + tWR).  Writes of
// out-of-range values are clamped: latencies to at least 1, the burst length to
// 1, 2 or 4 (the modes this design evaluates) and CL to 1..3 (Table of CAS
// latencies).
//
// Reset values are the design's example setting CL = 3, BL = 4 with
// tRP = tRCD = 2 cycles (taken from its timing diagrams); tWR = 2 is this
// module's own choice.  Outputs are registers; a write takes effect next cycle.
module timing_unit #(
  parameter logic [3:0] RST_TRP  = 4'd2,
  parameter logic [3:0] RST_TRCD = 4'd2,
  parameter logic [3:0] RST_CL   = 4'd3,
  parameter logic [3:0] RST_BL   = 4'd4,
  parameter logic [3:0] RST_TWR  = 4'd2
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_we,
  input  logic [3:0] cfg_trp,
  input  logic [3:0] cfg_trcd,
  input  logic [3:0] cfg_cl,
  input  logic [3:0] cfg_bl,
  input  logic [3:0] cfg_twr,
  output logic [3:0] t_rp,
  output logic [3:0] t_rcd,
  output logic [3:0] t_cl,
  output logic [3:0] t_bl,
  output logic [3:0] t_wr,
  output logic [4:0] t_rd_to_pre,
  output logic [4:0] t_wr_to_pre
);

  function automatic logic [3:0] atleast1(input logic [3:0] v);
    return (v == 4'd0) ? 4'd1 : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_rp  <= RST_TRP;
      t_rcd <= RST_TRCD;
      t_cl  <= RST_CL;
      t_bl  <= RST_BL;
      t_wr  <= RST_TWR;
    end else if (cfg_we) begin
      t_rp  <= atleast1(cfg_trp);
      t_rcd <= atleast1(cfg_trcd);
      t_cl  <= (cfg_cl == 4'd0) ? 4'd1 : (cfg_cl > 4'd3) ? 4'd3 : cfg_cl;
      t_bl  <= (cfg_bl >= 4'd4) ? 4'd4 : (cfg_bl >= 4'd2) ? 4'd2 : 4'd1;
      t_wr  <= atleast1(cfg_twr);
    end
  end

  assign t_rd_to_pre = {1'b0, t_bl};
  assign t_wr_to_pre = {1'b0, t_bl} + {1'b0, t_wr};

endmodule
