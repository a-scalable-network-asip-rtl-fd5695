// tb_asip_csum: checks the checksum engine.
// 1. Incremental update: a random 20 byte header with a correct Internet
//    checksum is modified one 16 or 32 bit field at a time by "stores"
//    (new value in E1, old value on the Read-Before-Write bus in E2);
//    afterwards the inverted REG_CSUM[1] must equal the checksum recomputed
//    from scratch over the modified header.
// 2. Fresh sum: REG_CSUM[0] accumulates all header words as "loads"; its
//    inverse must equal the header checksum.
// 3. Latency: an update issued in E1 must be visible after the third clock
//    edge and not after the second.
// 4. Swap: a byte pair summed with swap = 1 adds the byte-swapped value.
module tb_asip_csum;
  import asip_pkg::*;
  logic clk = 0, rst_n = 0;
  csum_f_t e1_ctl;
  logic e1_new_valid, e2_old_valid, wr_en, wr_idx;
  bus_t e1_bus, e2_rbw;
  data_t wr_data;
  data_t csum [2];
  int checks = 0, failures = 0;
  logic [15:0] hdr [10];

  asip_csum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] inet_csum();
    int unsigned s = 0;
    for (int i = 0; i < 10; i++) if (i != 5) s += hdr[i];
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return ~16'(s);
  endfunction

  task automatic idle();
    e1_ctl = '0; e1_new_valid = 0; e2_old_valid = 0; wr_en = 0; e1_bus = 0;
  endtask

  // one instruction: E1 now, RBW value one cycle later
  task automatic store(bus_t nv, bus_t ov, logic en0, logic en1, logic sw, logic has_old);
    @(negedge clk);
    idle();
    e1_ctl = '{en0: en0, en1: en1, swap: sw}; e1_new_valid = 1; e1_bus = nv;
    @(negedge clk);
    idle();
    e2_old_valid = has_old; e2_rbw = ov;
  endtask

  task automatic flush();
    repeat (3) begin @(negedge clk); idle(); end
  endtask

  initial begin
    idle(); e2_rbw = 0; wr_idx = 0; wr_data = 0;
    #12 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < 10; i++) hdr[i] = 16'($urandom);
      hdr[5] = inet_csum();
      // REG_CSUM[1] <- ~field (bus write stores the inverse)
      @(negedge clk); idle(); wr_en = 1; wr_idx = 1; wr_data = hdr[5];
      @(negedge clk); idle();
      // REG_CSUM[0] <- ~0xFFFF = 0
      wr_en = 1; wr_idx = 0; wr_data = 16'hFFFF;
      @(negedge clk); idle();
      // modify four fields (16 and 32 bit)
      for (int k = 0; k < 4; k++) begin
        int f;
        f = $urandom_range(0, 8);
        if (f == 5 || f == 4) f = 6;
        if (k % 2 == 0) begin
          logic [15:0] nv;
          nv = 16'($urandom);
          store({16'd0, nv}, {16'd0, hdr[f]}, 0, 1, 0, 1);
          hdr[f] = nv;
        end else begin
          logic [31:0] nv;
          nv = $urandom;
          store(nv, {hdr[f], hdr[f+1]}, 0, 1, 0, 1);
          hdr[f] = nv[31:16]; hdr[f+1] = nv[15:0];
        end
      end
      flush();
      checks++;
      if (~csum[1] !== inet_csum()) begin
        failures++; $display("FAIL incremental %h vs %h", ~csum[1], inet_csum());
      end
      // fresh sum over all words but the checksum field, as 32 bit loads
      for (int i = 0; i < 10; i += 2) begin
        bus_t v;
        v = {(i == 4) ? hdr[4] : hdr[i], hdr[i+1]};
        if (i == 4) v = {hdr[4], 16'd0};
        store(v, 0, 1, 0, 0, 0);
      end
      flush();
      checks++;
      if (~csum[0] !== inet_csum()) begin
        failures++; $display("FAIL fresh %h vs %h", ~csum[0], inet_csum());
      end
    end
    // latency
    @(negedge clk); idle(); wr_en = 1; wr_idx = 0; wr_data = 16'hFFFF;
    @(negedge clk); idle();
    e1_ctl = '{en0: 1, en1: 0, swap: 0}; e1_new_valid = 1; e1_bus = 32'h0000_1234;
    @(negedge clk); idle();
    @(negedge clk);
    checks++; if (csum[0] !== 16'h0000) begin failures++; $display("FAIL early update"); end
    @(negedge clk);
    checks++; if (csum[0] !== 16'h1234) begin failures++; $display("FAIL latency %h", csum[0]); end
    // swap
    store(32'h0000_00AB, 0, 1, 0, 1, 0);
    flush();
    checks++; if (csum[0] !== 16'hBD34) begin failures++; $display("FAIL swap %h", csum[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
