// imu_dram_ctrl: the IMU's control of its static-column dynamic RAM.
//
// The microprogram draws the RAS and CS waveforms itself: each tick part has
// three RAS bits and three CS bits, one per sub-tick, loaded broadside into
// shift registers when the tick starts and shifted once per sub-tick; the
// pins follow the register's output. WE needs only one bit, because it is
// held inactive in the first and last sub-tick of every tick. So the RAM
// can be cycled in three ticks: row address from M with RAS active (while M
// swaps its halves), column address from M with CS active, data at the end of
// the third tick. The address pins carry M[10:0], which holds the row in the
// first tick and, after the swap, the column (old M[30:20]) in the second.
// Write data is M: the d pins are wired straight from the M register, with
// no logic of this block in between. One even parity bit is written with each word and checked
// whenever a word read from the RAM is loaded into the data section
// (par_err is sticky until reset).
//
// Refresh is invisible to the microcode: every REF_INTERVAL ticks of time
// (3*REF_INTERVAL clocks, counted whether or not the IMU is running or
// waiting) a RAS-only refresh of the next row is due; it waits for a tick
// boundary at which RAS and CS are inactive, then holds up the whole IMU
// (hold) for REF_SUBTICKS sub-ticks. With the defaults, 6 sub-ticks per 200 ticks is 1% of the time.
// The document gives the sub-tick control scheme and an upper bound on refresh
// time; the pin mapping, parity width and refresh numbers are this design's.
// Pins are active low.
module imu_dram_ctrl
  import grip_pkg::*;
#(
  parameter int REF_INTERVAL = 200,
  parameter int REF_SUBTICKS = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick_start,
  input  logic        tick_end,
  input  logic [1:0]  st,
  input  logic        active,       // a tick is in progress
  input  tick_t       tk,
  input  logic [MEM_W-1:0] m,
  input  logic        check,        // a RAM word is being loaded this tick_end
  input  logic [MEM_W-1:0] q,       // RAM data out
  input  logic        q_par,
  output logic        ras_n,
  output logic        cs_n,
  output logic        we_n,
  output logic [10:0] addr,
  output logic [MEM_W-1:0] d,
  output logic        d_par,
  output logic        hold,
  output logic        par_err,
  output logic        ev_refresh
);
  logic [1:0] ras_sr, cs_sr;
  logic       we_b;
  logic       ras_last, cs_last;    // levels in the last sub-tick of the last tick
  logic [$clog2(3*REF_INTERVAL+1)-1:0] ref_cnt;
  logic       ref_due, in_ref;
  logic [$clog2(REF_SUBTICKS+1)-1:0] ref_st;
  logic [10:0] ref_row;

  // shift registers: sub-tick 0 is taken straight from the word being loaded
  wire ras_now = tick_start ? tk.ras[0] : (active && ras_sr[0]);
  wire cs_now  = tick_start ? tk.cs[0]  : (active && cs_sr[0]);
  wire we_now  = active && (st == 2'd1) && we_b;
  wire ref_ras = in_ref && (int'(ref_st) < REF_SUBTICKS / 2);

  assign ev_refresh = ref_due && !in_ref && st == 2'd0 && !active && !ras_last && !cs_last;
  assign hold  = in_ref || ev_refresh;
  assign ras_n = !(ras_now || ref_ras);
  assign cs_n  = !cs_now;
  assign we_n  = !we_now;
  assign addr  = in_ref ? ref_row : m[10:0];
  assign d     = m;
  assign d_par = par40(m);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ras_sr <= '0; cs_sr <= '0; we_b <= 1'b0; ras_last <= 1'b0; cs_last <= 1'b0;
      ref_cnt <= '0; ref_due <= 1'b0; in_ref <= 1'b0; ref_st <= '0; ref_row <= '0;
      par_err <= 1'b0;
    end else begin
      if (tick_start) begin
        ras_sr <= tk.ras[2:1]; cs_sr <= tk.cs[2:1]; we_b <= tk.we;
      end else if (active) begin
        ras_sr <= {1'b0, ras_sr[1]}; cs_sr <= {1'b0, cs_sr[1]};
      end
      if (tick_end) begin
        ras_last <= ras_now; cs_last <= cs_now;
        if (check && (par40(q) != q_par)) par_err <= 1'b1;
      end
      if (int'(ref_cnt) == 3 * REF_INTERVAL - 1) begin ref_cnt <= '0; ref_due <= 1'b1; end
      else ref_cnt <= ref_cnt + 1'b1;
      if (ev_refresh) begin
        in_ref <= 1'b1; ref_st <= '0; ref_due <= 1'b0;
      end else if (in_ref) begin
        if (int'(ref_st) == REF_SUBTICKS - 1) begin
          in_ref <= 1'b0; ref_row <= ref_row + 1'b1;
        end else ref_st <= ref_st + 1'b1;
      end
    end
  end
endmodule
