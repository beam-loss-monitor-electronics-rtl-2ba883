// tb_pm_recorder -- self-checking testbench of the post-mortem recorder.
//
// Small buffers (A: 5 acquisitions, B: 3 integrals of 3 steps, 4 detectors) so that
// both buffers wrap many times. Each period of 80 cycles starts with acq_tick; the four
// links then deliver random word streams: complete packets, missing packets, truncated
// packets, packets restarted by a second start-of-frame, surplus words and words without
// a start. The detector values arrive one per cycle in cycles 3..6. Freeze requests come
// at random cycles, sometimes in the tick cycle itself.
// The testbench keeps its own picture of the SRAM, written by the rules of the recorder
// (what each link delivered since its last start-of-frame, integrals of the values,
// circular records in the half selected by the freezes) and compares the whole SRAM at
// the end of every period. It also checks the freeze report one cycle after the
// boundary at which the freeze takes effect, and the number of SRAM writes per period
// (40 for buffer A plus 4 for each integral).
module tb_pm_recorder;
  import blm_pkg::*;

  localparam int unsigned NL = 4, NC = 4, NT = 5, IS = 3, NI = 3, AW = 9;
  localparam int unsigned ACQ = 80, NPER = 3000;
  localparam int unsigned A_WORDS = NT * NL * 10, B_WORDS = NI * NC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NL-1:0]       rx_valid, rx_sof;
  logic [NL-1:0][15:0] rx_data;
  logic                acq_tick, in_valid, in_last, pm_freeze;
  logic [1:0]          in_ch;
  logic [VAL_W-1:0]    in_val;
  logic                sram_we;
  logic [AW-1:0]       sram_addr;
  logic [31:0]         sram_wdata;
  logic                cur_half, frz_valid, frz_half, frz_a_full, frz_b_full;
  logic [2:0]          frz_a_ptr;
  logic [1:0]          frz_b_ptr;
  logic [15:0]         frz_count;

  pm_recorder #(.N_LINK(NL), .N_CH(NC), .N_TURNS(NT), .INT_STEPS(IS), .N_INT(NI), .ADDR_W(AW))
    dut (.*);

  // board SRAM
  logic [31:0] sram [1 << AW];
  always_ff @(posedge clk) if (rst_n && sram_we) sram[sram_addr] <= sram_wdata;
  int unsigned n_we;
  always @(posedge clk) if (rst_n && sram_we) n_we++;

  int unsigned checks = 0, failures = 0;
  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // reference
  logic [31:0] ref_mem [1 << AW];
  logic [15:0] pkt [NL][20];
  int          pidx [NL];
  longint unsigned acc [NC];
  int          m_half, m_aptr, m_bptr, m_icnt, m_frz;
  bit          m_afull, m_bfull, m_pend;
  // expected freeze report
  bit          e_frz;
  int          e_half, e_aptr, e_bptr;
  bit          e_afull, e_bfull;
  int          n_frz, n_awrap, n_bwrap, n_restart, n_trunc, n_missing;

  typedef struct { bit sof; logic [15:0] d; } wrd_t;
  wrd_t q [NL][$];

  task automatic gen_link(input int l);
    int mode, len;
    q[l].delete();
    mode = $urandom_range(0, 9);
    if (mode == 1) begin n_missing++; return; end
    if (mode == 5) for (int i = 0; i < 3; i++) q[l].push_back('{0, 16'($urandom)});
    if (mode == 3) begin
      n_restart++;
      for (int i = 0; i < 7; i++) q[l].push_back('{i == 0, 16'($urandom)});
    end
    len = (mode == 2) ? 10 : (mode == 4) ? 25 : 20;
    if (mode == 2) n_trunc++;
    for (int i = 0; i < len; i++) q[l].push_back('{i == 0, 16'($urandom)});
  endtask

  task automatic tick_model();
    if (m_pend) begin
      e_frz = 1; e_half = m_half; e_aptr = m_aptr; e_afull = m_afull;
      e_bptr = m_bptr; e_bfull = m_bfull;
      m_half ^= 1; m_aptr = 0; m_afull = 0; m_bptr = 0; m_bfull = 0; m_frz++;
    end else e_frz = 0;
    m_pend = 0;
    for (int l = 0; l < NL; l++)
      for (int i = 0; i < 10; i++)
        ref_mem[m_half * A_WORDS + m_aptr * NL * 10 + l * 10 + i] = {pkt[l][2 * i], pkt[l][2 * i + 1]};
    if (m_aptr == NT - 1) begin m_aptr = 0; m_afull = 1; n_awrap++; end
    else m_aptr++;
    for (int l = 0; l < NL; l++) begin
      for (int i = 0; i < 20; i++) pkt[l][i] = 0;
      pidx[l] = 20;
    end
  endtask

  initial begin
    int exp_we;
    rx_valid = 0; rx_sof = 0; rx_data = 0; acq_tick = 0; in_valid = 0; in_last = 0;
    in_ch = 0; in_val = 0; pm_freeze = 0;
    n_we = 0; n_frz = 0; n_awrap = 0; n_bwrap = 0; n_restart = 0; n_trunc = 0; n_missing = 0;
    for (int i = 0; i < (1 << AW); i++) begin sram[i] = 0; ref_mem[i] = 0; end
    for (int l = 0; l < NL; l++) begin
      for (int i = 0; i < 20; i++) pkt[l][i] = 0;
      pidx[l] = 20;
    end
    foreach (acc[c]) acc[c] = 0;
    m_half = 0; m_aptr = 0; m_bptr = 0; m_icnt = 0; m_frz = 0;
    m_afull = 0; m_bfull = 0; m_pend = 0; e_frz = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NPER; p++) begin
      int fcyc;
      exp_we = NL * 10;
      fcyc = ($urandom_range(0, 5) == 0) ? $urandom_range(0, ACQ - 1) : -1;
      for (int l = 0; l < NL; l++) gen_link(l);
      for (int cyc = 0; cyc < int'(ACQ); cyc++) begin
        // this cycle's inputs
        acq_tick = (cyc == 0);
        pm_freeze = (cyc == fcyc);
        if (cyc == 0) tick_model();
        if (pm_freeze) m_pend = 1;
        for (int l = 0; l < NL; l++) begin
          rx_valid[l] = 0; rx_sof[l] = 0;
          if (cyc >= 1 && q[l].size() > 0 && $urandom_range(0, 3) != 0) begin
            wrd_t w;
            w = q[l].pop_front();
            rx_valid[l] = 1; rx_sof[l] = w.sof; rx_data[l] = w.d;
            if (w.sof) begin
              for (int i = 0; i < 20; i++) pkt[l][i] = 0;
              pkt[l][0] = w.d; pidx[l] = 1;
            end else if (pidx[l] < 20) begin
              pkt[l][pidx[l]] = w.d; pidx[l]++;
            end
          end
        end
        in_valid = (cyc >= 3 && cyc <= 6);
        in_ch = 2'(cyc - 3);
        in_last = (cyc == 6);
        in_val = VAL_W'($urandom);
        if (in_valid) begin
          acc[in_ch] += in_val;
          if (in_last) begin
            if (m_icnt == IS - 1) begin
              for (int c = 0; c < NC; c++) begin
                ref_mem[2 * A_WORDS + m_half * B_WORDS + m_bptr * NC + c] = 32'(acc[c]);
                acc[c] = 0;
              end
              exp_we += NC;
              if (m_bptr == NI - 1) begin m_bptr = 0; m_bfull = 1; n_bwrap++; end
              else m_bptr++;
              m_icnt = 0;
            end else m_icnt++;
          end
        end
        @(negedge clk);
        // freeze report, one cycle after the boundary
        if (cyc == 0) begin
          chk(frz_valid == e_frz, $sformatf("period %0d frz_valid", p));
          chk(cur_half == 1'(m_half), "current half");
          if (e_frz) begin
            n_frz++;
            chk(frz_half == 1'(e_half) && frz_a_ptr == 3'(e_aptr) && frz_a_full == e_afull &&
                frz_b_ptr == 2'(e_bptr) && frz_b_full == e_bfull && frz_count == 16'(m_frz),
                $sformatf("period %0d freeze report", p));
          end
        end
        if (cyc == 0) n_we = 0;
      end
      // whole SRAM after the period; write count of the period
      for (int i = 0; i < (1 << AW); i++)
        chk(sram[i] == ref_mem[i], $sformatf("period %0d addr %0d got %h exp %h", p, i, sram[i], ref_mem[i]));
      if (p > 0) chk(n_we == exp_we, $sformatf("period %0d writes %0d exp %0d", p, n_we, exp_we));
    end
    $display("freezes=%0d A wraps=%0d B wraps=%0d restarts=%0d truncated=%0d missing=%0d",
             n_frz, n_awrap, n_bwrap, n_restart, n_trunc, n_missing);
    chk(n_frz > 10 && n_awrap > 10 && n_bwrap > 10, "mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPER * ACQ + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
