// tb_asip_memctrl: checks the byte-lane logic against a flat byte array.
// The testbench plays the two 16 bit BRAM banks itself: it applies the
// bank indices, byte enables and data the block produces, reads the banks
// back and feeds the registered offset/size to the response side. 8 and 16
// bit accesses at every byte offset and 32 bit accesses at even addresses
// are compared with big-endian values taken from the byte array.
module tb_asip_memctrl;
  import asip_pkg::*;
  ptr_t addr;
  size_e size;
  bus_t wdata, rvalue;
  logic [9:0] idx0, idx1;
  logic [1:0] be0, be1;
  logic [15:0] wd0, wd1, rd0, rd1;
  logic r_odd, r_swapped;
  size_e r_size;
  logic [15:0] b0 [1024];
  logic [15:0] b1 [1024];
  logic [7:0] mem [4096];
  int checks = 0, failures = 0;

  asip_memctrl dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bus_t model_rd(int a, size_e s);
    case (s)
      SZ8:  return {24'd0, mem[a]};
      SZ16: return {16'd0, mem[a], mem[(a+1)%4096]};
      default: return {mem[a], mem[a+1], mem[a+2], mem[a+3]};
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 1024; i++) begin
      b0[i] = 16'($urandom); b1[i] = 16'($urandom);
    end
    for (int h = 0; h < 2048; h++) begin
      logic [15:0] v;
      v = h[0] ? b1[h>>1] : b0[h>>1];
      mem[2*h] = v[15:8]; mem[2*h+1] = v[7:0];
    end
    for (int t = 0; t < 3000; t++) begin
      int a;
      logic wr;
      bus_t exp;
      size = size_e'($urandom_range(0, 2));
      a = $urandom_range(0, 4091);
      if (size == SZ32) a = a & ~1;
      addr = ptr_t'(a);
      wdata = $urandom;
      wr = 1'($urandom);
      exp = model_rd(a, size);
      #1;
      // bank read (before write) and registered response info
      rd0 = b0[idx0]; rd1 = b1[idx1];
      r_odd = addr[0] && size != SZ32; r_swapped = addr[1]; r_size = size;
      if (wr) begin
        if (be0[1]) b0[idx0][15:8] = wd0[15:8];
        if (be0[0]) b0[idx0][7:0]  = wd0[7:0];
        if (be1[1]) b1[idx1][15:8] = wd1[15:8];
        if (be1[0]) b1[idx1][7:0]  = wd1[7:0];
        case (size)
          SZ8:  mem[a] = wdata[7:0];
          SZ16: begin mem[a] = wdata[15:8]; mem[a+1] = wdata[7:0]; end
          default: begin mem[a] = wdata[31:24]; mem[a+1] = wdata[23:16];
                         mem[a+2] = wdata[15:8]; mem[a+3] = wdata[7:0]; end
        endcase
      end
      #1;
      checks++;
      if (rvalue !== exp) begin
        failures++;
        $display("FAIL a=%0d size=%0d got %h exp %h", a, size, rvalue, exp);
      end
    end
    // the whole memory must still agree with the byte model
    for (int h = 0; h < 2048; h++) begin
      logic [15:0] v;
      v = h[0] ? b1[h>>1] : b0[h>>1];
      checks++;
      if (v !== {mem[2*h], mem[2*h+1]}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
