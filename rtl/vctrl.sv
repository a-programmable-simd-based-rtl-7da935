// vctrl: vector controller of a SIMD cluster.
//
// Runs one vector instruction: rep repetitions (hardware loop) of a vector
// of lenm1+1 steps.  It issues the load of every step, then, one cycle
// later when the data arrive from memory, the datapath step (ex_*), and one
// cycle after that the store of the result (st_*), so load, execute and
// store of consecutive steps overlap and the cluster sustains one step per
// clock cycle.
//   prefill : in sliding-window mode three extra loads fill the window
//             before the first datapath step;
//   noload  : operands come from the store unit's feedback, nothing is read;
//   st_each : a result is stored after every step (element-wise operations);
//             otherwise one result is stored at the end of each vector
//             (accumulating operations);  nostore: nothing is stored.
// ex_first / ex_last mark the first and last step of each vector, ex_istart
// the first step of the instruction, ex_idx counts steps from 0.
// ld_restart / st_restart mark the first load and store of the instruction
// so that the bank AGUs start at their base address.  busy is high from
// start until the last store has been issued; start is ignored while busy.
//
// Follows the architecture: the vector controller orders loads and stores
// and counts the hardware loop; vector lengths up to 128.  The three-stage
// overlap and the prefill are this design's choice.  The in-flight assertion
// uses rst_n as a qualifier, which tools may report as a sync/async mix.
module vctrl
  import rake_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [6:0]  lenm1,
  input  logic [15:0] rep,
  input  logic        prefill,
  input  logic        noload,
  input  logic        st_each,
  input  logic        nostore,
  output logic        busy,
  output logic        ld_en,
  output logic        ld_restart,
  output logic        rd_v,        // load data valid this cycle
  output logic        ex_en,
  output logic        ex_first,
  output logic        ex_last,
  output logic        ex_istart,
  output logic [15:0] ex_idx,
  output logic        st_en,
  output logic        st_restart
);
  logic        issuing, first_ld, first_st;
  logic [1:0]  pre_cnt;
  logic [6:0]  i_cnt, len_q;
  logic [15:0] r_cnt, rep_q, idx;
  logic        noload_q, st_each_q, nostore_q;
  logic        t_ex, t_first, t_last, t_istart;

  // token issued this cycle
  always_comb begin
    t_ex     = issuing && pre_cnt == '0;
    t_first  = i_cnt == '0;
    t_last   = i_cnt == len_q;
    t_istart = idx == '0;
  end

  assign ld_en      = issuing && !noload_q;
  assign ld_restart = ld_en && first_ld;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      issuing <= 1'b0; first_ld <= 1'b0; first_st <= 1'b0;
      pre_cnt <= '0; i_cnt <= '0; len_q <= '0; r_cnt <= '0; rep_q <= '0; idx <= '0;
      noload_q <= 1'b0; st_each_q <= 1'b0; nostore_q <= 1'b0;
      rd_v <= 1'b0;
      ex_en <= 1'b0; ex_first <= 1'b0; ex_last <= 1'b0; ex_istart <= 1'b0; ex_idx <= '0;
      st_en <= 1'b0; st_restart <= 1'b0;
    end else begin
      // issue stage
      if (start && !busy) begin
        issuing   <= 1'b1;
        first_ld  <= 1'b1;
        first_st  <= 1'b1;
        pre_cnt   <= (prefill && !noload) ? 2'd3 : 2'd0;
        i_cnt     <= '0;
        len_q     <= lenm1;
        r_cnt     <= '0;
        rep_q     <= (rep == '0) ? 16'd1 : rep;
        idx       <= '0;
        noload_q  <= noload;
        st_each_q <= st_each;
        nostore_q <= nostore;
      end else if (issuing) begin
        first_ld <= 1'b0;
        if (pre_cnt != '0) pre_cnt <= pre_cnt - 2'd1;
        else begin
          idx <= idx + 16'd1;
          if (t_last) begin
            i_cnt <= '0;
            r_cnt <= r_cnt + 16'd1;
            if (r_cnt + 16'd1 == rep_q) issuing <= 1'b0;
          end else
            i_cnt <= i_cnt + 7'd1;
        end
      end
      // execute stage
      rd_v      <= ld_en;
      ex_en     <= t_ex;
      ex_first  <= t_first;
      ex_last   <= t_last;
      ex_istart <= t_istart;
      ex_idx    <= idx;
      // store stage
      st_en      <= ex_en && !nostore_q && (st_each_q || ex_last);
      st_restart <= ex_en && !nostore_q && (st_each_q || ex_last) && first_st;
      if (ex_en && !nostore_q && (st_each_q || ex_last)) first_st <= 1'b0;
    end

  assign busy = issuing || ex_en || st_en;

  // a step is only executed while an instruction is in flight
  a_ex_in_flight: assert property (@(posedge clk) disable iff (!rst_n) ex_en |-> $past(issuing));
endmodule
