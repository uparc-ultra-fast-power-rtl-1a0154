// dyclogen: dynamic clock generator controller (DyCloGen).
//
// UPaRC runs on three clocks that can be changed while the system runs:
//   CLK_1 (index 0) preloads the BRAM, CLK_2 (index 1) drives UReC, BRAM port B and
//   ICAP, CLK_3 (index 2) drives the decompressor.
// Each comes from the frequency-synthesis output of its own digital clock manager
// (DCM), Fout = Fin * M / D. DyCloGen changes M and D of one DCM at a time through the
// DCM's Dynamic Reconfiguration Port (DRP), without partial reconfiguration.
//
// Sequence for one request (req_valid while req_ready, selecting clock req_sel):
//   1. Check 2 <= M <= 33 and 1 <= D <= 32; outside that, err is set and nothing is changed.
//   2. Hold the selected DCM in reset (dcm_rst) for RST_CYCLES cycles.
//   3. One DRP write cycle (drp_den, drp_dwe) to address DRP_ADDR_MD with
//      data {M-1, D-1}; wait for drp_drdy.
//   4. Release the reset and wait for dcm_locked.
//   5. Pulse done for one cycle, update cur_m/cur_d of that clock, return to idle.
// The clock being changed stops while its DCM is in reset, so the manager must not
// change CLK_2 or CLK_3 while a reconfiguration is running.
//
// Runs on the DRP clock, the fixed DCM input clock Fin (100 MHz in the reference
// system). The M/D factors and the use of the DCM's DRP follow the UPaRC architecture. The
// request interface, the reset-write-release order, the register address 0x50 with
// {M-1, D-1} and the M/D ranges are those of the Virtex-5 DCM and are this
// implementation's choice, as are the per-clock reset values M_INIT/D_INIT.
module dyclogen
  import uparc_pkg::*;
#(
  parameter int unsigned RST_CYCLES  = 4,
  parameter logic [6:0]  DRP_ADDR_MD = 7'h50,
  parameter int unsigned M_MIN = 2,
  parameter int unsigned M_MAX = 33,
  parameter int unsigned D_MIN = 1,
  parameter int unsigned D_MAX = 32,
  // Factors the DCMs hold after configuration: all three clocks at Fin
  parameter logic [7:0]  M_INIT = 8'd2,
  parameter logic [7:0]  D_INIT = 8'd2
) (
  input  logic                 clk,          // DRP clock (Fin)
  input  logic                 rst_n,        // asynchronous, active low
  // Request from the manager
  input  logic                 req_valid,
  input  clk_sel_e             req_sel,
  input  logic [7:0]           req_m,
  input  logic [7:0]           req_d,
  output logic                 req_ready,
  output logic                 done,         // one-cycle pulse: new frequency locked
  output logic                 err,          // last request was out of range
  output logic [7:0]           cur_m [NUM_CLKS],
  output logic [7:0]           cur_d [NUM_CLKS],
  // DCM control, one set per clock
  output logic [NUM_CLKS-1:0]  dcm_rst,
  output logic [NUM_CLKS-1:0]  drp_den,
  output logic [NUM_CLKS-1:0]  drp_dwe,
  output logic [6:0]           drp_daddr,    // shared by the three DCMs
  output logic [15:0]          drp_di,       // shared by the three DCMs
  input  logic [NUM_CLKS-1:0]  drp_drdy,
  input  logic [NUM_CLKS-1:0]  dcm_locked
);

  typedef enum logic [2:0] {S_IDLE, S_RST, S_WRITE, S_WAIT_RDY, S_RELEASE, S_WAIT_LOCK} state_e;

  state_e      state;
  logic [1:0]  sel;
  logic [7:0]  m_q, d_q;
  logic [$clog2(RST_CYCLES+1)-1:0] cnt;
  logic        in_range;

  assign in_range  = (req_m >= 8'(M_MIN)) && (req_m <= 8'(M_MAX)) &&
                     (req_d >= 8'(D_MIN)) && (req_d <= 8'(D_MAX)) &&
                     (req_sel != clk_sel_e'(2'd3));
  assign req_ready = state == S_IDLE;
  assign drp_daddr = DRP_ADDR_MD;
  assign drp_di    = {m_q - 8'd1, d_q - 8'd1};

  always_comb begin
    dcm_rst = '0;
    drp_den = '0;
    drp_dwe = '0;
    if (state == S_RST || state == S_WRITE || state == S_WAIT_RDY || state == S_RELEASE)
      dcm_rst[sel] = 1'b1;
    if (state == S_WRITE) begin
      drp_den[sel] = 1'b1;
      drp_dwe[sel] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sel   <= '0;
      m_q   <= M_INIT;
      d_q   <= D_INIT;
      cnt   <= '0;
      done  <= 1'b0;
      err   <= 1'b0;
      for (int i = 0; i < NUM_CLKS; i++) begin
        cur_m[i] <= M_INIT;
        cur_d[i] <= D_INIT;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          if (in_range) begin
            state <= S_RST;
            sel   <= req_sel;
            m_q   <= req_m;
            d_q   <= req_d;
            cnt   <= '0;
            err   <= 1'b0;
          end else begin
            err   <= 1'b1;
          end
        end
        S_RST: begin
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(RST_CYCLES - 1)) state <= S_WRITE;
        end
        S_WRITE:    state <= S_WAIT_RDY;
        S_WAIT_RDY: if (drp_drdy[sel]) state <= S_RELEASE;
        S_RELEASE:  state <= S_WAIT_LOCK;
        S_WAIT_LOCK: if (dcm_locked[sel]) begin
          state      <= S_IDLE;
          done       <= 1'b1;
          cur_m[sel] <= m_q;
          cur_d[sel] <= d_q;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DRP rule: a write strobe lasts exactly one cycle and only while the DCM is in reset.
  a_den_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    |drp_den |=> ~|drp_den);
  a_den_rst: assert property (@(posedge clk) disable iff (!rst_n)
    |drp_den |-> |(drp_den & dcm_rst));

endmodule
