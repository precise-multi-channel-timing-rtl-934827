// tdc_calibration: code-density calibration and fine-time look-up of one channel.
//
// The delay-line elements are not equally long, so a raw code does not map
// linearly to time. At start-up (and again on cal_start) the channel is fed
// with hits that are uncorrelated with the system clock; their arrival
// phase is uniform over the clock period, so the number of hits landing in
// a bin is proportional to that bin's width. The block
//   CLEAR   zeroes the 512-entry histogram RAM, one bin per cycle;
//   COLLECT counts 2^CAL_LOG2 raw codes into the histogram (a read-modify-
//           write pipeline with forwarding accepts one code per cycle);
//   SUM     walks the bins in order, keeps the running (cumulative) count
//           and writes fine[i] = 2^12 * N_cumulative(i) / N_total into the
//           look-up RAM (bin edge = T_clk * N_cumulative / N_total, with
//           T_clk = 2^12 fine units);
//   RUN     returns fine[code] one cycle after each valid code.
// The histogram, the cumulative sum, the per-bin look-up table in block RAM
// and the start-up run follow the published design. The number of
// calibration hits is this design's choice: a power of two so that the
// division by N_total is a shift. N_cumulative(i) includes bin i itself;
// the result saturates at 2^12-1. Codes arriving outside RUN give no fine
// time. Calibration takes about 512 + 2^CAL_LOG2 hits + 512 cycles.
// max_code is the largest code collected: hits arrive at most one clock
// period before the sampling edge, so it marks how many taps one period
// spans (about 372 at 21.5 ps per tap). The channel uses it to tell a new
// edge from one it has already tagged.
// Interface: code_valid/code in, fine_valid/fine out, cal_done high in RUN.
`timescale 1ps/1ps
module tdc_calibration
  import lidar_tdc_pkg::*;
#(
  parameter int unsigned N_BINS    = 512,
  parameter int unsigned CAL_LOG2  = 16,
  parameter int unsigned CODE_BITS = $clog2(N_BINS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cal_start,   // restart the calibration
  input  logic                 code_valid,
  input  logic [CODE_BITS-1:0] code,
  output logic                 fine_valid,
  output fine_t                fine,
  output logic                 cal_done,
  output logic [CODE_BITS-1:0] max_code     // largest code seen while collecting
);

  localparam int unsigned CNT_BITS = CAL_LOG2 + 1;               // one bin may hold every hit
  localparam int unsigned SCL_BITS = CNT_BITS + FINE_BITS;
  localparam logic [CNT_BITS-1:0] N_TOTAL = CNT_BITS'(1) << CAL_LOG2;

  cal_state_t state;

  // Histogram RAM ports
  logic                 h_we;
  logic [CODE_BITS-1:0] h_waddr, h_raddr;
  logic [CNT_BITS-1:0]  h_wdata, h_rdata;
  // Look-up RAM ports
  logic                 l_we;
  logic [CODE_BITS-1:0] l_waddr;
  fine_t                l_wdata;

  sdp_ram #(.DEPTH(N_BINS), .WIDTH(CNT_BITS)) u_hist (
    .clk, .we(h_we), .waddr(h_waddr), .wdata(h_wdata), .raddr(h_raddr), .rdata(h_rdata)
  );
  sdp_ram #(.DEPTH(N_BINS), .WIDTH(FINE_BITS)) u_lut (
    .clk, .we(l_we), .waddr(l_waddr), .wdata(l_wdata), .raddr(code), .rdata(fine)
  );

  logic [CODE_BITS-1:0] idx;        // bin counter of CLEAR and SUM
  logic [CNT_BITS-1:0]  accepted;   // calibration hits taken so far
  logic                 p_valid;    // read-modify-write stage (COLLECT) / read stage (SUM)
  logic [CODE_BITS-1:0] p_addr;
  logic                 f_valid;    // last histogram write, for forwarding
  logic [CODE_BITS-1:0] f_addr;
  logic [CNT_BITS-1:0]  f_data;
  logic [CNT_BITS-1:0]  cum;        // running cumulative count

  logic                 take;
  logic [CNT_BITS-1:0]  bin_now;
  logic [CNT_BITS-1:0]  cum_next;
  logic [SCL_BITS-1:0]  scaled;

  assign take     = (state == CAL_COLLECT) && code_valid && (accepted != N_TOTAL);
  assign bin_now  = (f_valid && f_addr == p_addr) ? f_data : h_rdata;
  assign cum_next = cum + h_rdata;
  assign scaled   = (SCL_BITS'(cum_next) << FINE_BITS) >> CAL_LOG2;

  always_comb begin
    h_we    = 1'b0;
    h_waddr = p_addr;
    h_wdata = bin_now + 1'b1;
    h_raddr = code;
    l_we    = 1'b0;
    l_waddr = p_addr;
    l_wdata = (scaled > SCL_BITS'({FINE_BITS{1'b1}})) ? {FINE_BITS{1'b1}} : fine_t'(scaled);
    unique case (state)
      CAL_CLEAR: begin
        h_we    = 1'b1;
        h_waddr = idx;
        h_wdata = '0;
      end
      CAL_COLLECT: h_we = p_valid;
      CAL_SUM: begin
        h_raddr = idx;
        l_we    = p_valid;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CAL_CLEAR;
      idx        <= '0;
      accepted   <= '0;
      max_code   <= '0;
      p_valid    <= 1'b0;
      p_addr     <= '0;
      f_valid    <= 1'b0;
      f_addr     <= '0;
      f_data     <= '0;
      cum        <= '0;
      fine_valid <= 1'b0;
    end else begin
      fine_valid <= (state == CAL_RUN) && code_valid && !cal_start;
      unique case (state)
        CAL_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == CODE_BITS'(N_BINS - 1)) begin
            state    <= CAL_COLLECT;
            accepted <= '0;
            max_code <= '0;
            p_valid  <= 1'b0;
            f_valid  <= 1'b0;
          end
        end
        CAL_COLLECT: begin
          p_valid <= take;
          p_addr  <= code;
          f_valid <= p_valid;
          f_addr  <= p_addr;
          f_data  <= bin_now + 1'b1;
          if (take) accepted <= accepted + 1'b1;
          if (take && code > max_code) max_code <= code;
          if (accepted == N_TOTAL && !p_valid) begin
            state   <= CAL_SUM;
            idx     <= '0;
            cum     <= '0;
            p_valid <= 1'b0;
          end
        end
        CAL_SUM: begin
          // cycle n: read bin idx; cycle n+1: accumulate it and write the LUT
          p_valid <= 1'b1;
          p_addr  <= idx;
          if (p_valid) cum <= cum_next;
          if (idx != CODE_BITS'(N_BINS - 1)) idx <= idx + 1'b1;
          if (p_valid && p_addr == CODE_BITS'(N_BINS - 1)) begin
            state   <= CAL_RUN;
            p_valid <= 1'b0;
          end
        end
        CAL_RUN: begin
          if (cal_start) begin
            state <= CAL_CLEAR;
            idx   <= '0;
          end
        end
        default: state <= CAL_CLEAR;
      endcase
    end
  end

  assign cal_done = (state == CAL_RUN);

endmodule
