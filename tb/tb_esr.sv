// tb_esr -- self-checking testbench of the Error & Status Report registers.
//
// For 20000 cycles every event input pulses at random (densities differ per input) and
// the status, ID and DAC inputs change now and then; every few cycles a random register
// is read. The testbench counts the events itself; a read must return, one cycle later,
// the count of events before the read (the VME access counter includes earlier reads
// only) or the latest status/ID/DAC value in the documented packing.
module tb_esr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ev_max_reset, ev_acq, ev_frame, ev_dump, ev_crc_a, ev_crc_b, ev_comp, ev_cid,
        ev_fid, ev_lost_a, ev_lost_b, rd_en;
  logic [15:0] status_a, status_b, fid, cid;
  logic [63:0] dac;
  logic [3:0]  rd_addr;
  logic [31:0] rd_data;

  esr dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned cnt [16];

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    logic [31:0] expd;
    bit pend;
    logic [3:0] pend_addr;
    {ev_max_reset, ev_acq, ev_frame, ev_dump, ev_crc_a, ev_crc_b, ev_comp, ev_cid,
     ev_fid, ev_lost_a, ev_lost_b, rd_en} = '0;
    status_a = 0; status_b = 0; fid = 0; cid = 0; dac = 0; rd_addr = 0;
    foreach (cnt[i]) cnt[i] = 0;
    pend = 0; pend_addr = 0; expd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      ev_max_reset = ($urandom_range(0, 99) == 0);
      ev_acq       = ($urandom_range(0, 1) == 0);
      ev_frame     = ($urandom_range(0, 2) == 0);
      ev_dump      = ($urandom_range(0, 199) == 0);
      ev_crc_a     = ($urandom_range(0, 9) == 0);
      ev_crc_b     = ($urandom_range(0, 11) == 0);
      ev_comp      = ($urandom_range(0, 13) == 0);
      ev_cid       = ($urandom_range(0, 29) == 0);
      ev_fid       = ($urandom_range(0, 19) == 0);
      ev_lost_a    = ($urandom_range(0, 7) == 0);
      ev_lost_b    = ($urandom_range(0, 5) == 0);
      if ($urandom_range(0, 9) == 0) begin
        status_a = 16'($urandom); status_b = 16'($urandom);
        fid = 16'($urandom); cid = 16'($urandom); dac = {$urandom, $urandom};
      end
      rd_en = ($urandom_range(0, 2) == 0);
      rd_addr = 4'($urandom);
      // expected read data (values before this cycle's events)
      if (rd_en) begin
        case (rd_addr)
          4'd10:   expd = {status_a, status_b};
          4'd13:   expd = {fid, cid};
          4'd14:   expd = dac[63:32];
          4'd15:   expd = dac[31:0];
          default: expd = cnt[rd_addr];
        endcase
      end
      pend = rd_en; pend_addr = rd_addr;
      @(negedge clk);
      if (pend) chk(rd_data == expd, $sformatf("reg %0d got %0d exp %0d", pend_addr, rd_data, expd));
      cnt[0] += ev_max_reset; cnt[1] += ev_acq;   cnt[2] += ev_frame;  cnt[3] += ev_dump;
      cnt[4] += rd_en;        cnt[5] += ev_crc_a; cnt[6] += ev_crc_b;  cnt[7] += ev_comp;
      cnt[8] += ev_cid;       cnt[9] += ev_fid;   cnt[11] += ev_lost_a; cnt[12] += ev_lost_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
