// tb_cplx_fmem: self-checking test of the complex on-chip memory.
//
// Writes random complex words to random addresses of a 121-word memory
// while reading two random addresses every tick, and compares both read
// ports with a reference copy. A word written on a tick must be visible on
// the following tick, and a read of the address being written returns the
// old word on that tick.
module tb_cplx_fmem;
  import psim_pkg::*;

  localparam int DEPTH = 121, AW = $clog2(DEPTH);

  logic          clk = 0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr, raddr0, raddr1;
  cplx_t         wdata, rdata0, rdata1;

  cplx_fmem #(.DEPTH(DEPTH)) dut (.*);

  cplx_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  function automatic cplx_t rnd_c();
    return '{re: num_t'({$urandom, $urandom}), im: num_t'({$urandom, $urandom})};
  endfunction

  initial begin
    we = 0; waddr = '0; raddr0 = '0; raddr1 = '0; wdata = CPLX_ZERO;
    // fill every word first so nothing unwritten is read
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = rnd_c();
      ref_mem[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      raddr0 = AW'($urandom % DEPTH);
      raddr1 = AW'($urandom % DEPTH);
      we     = ($urandom % 2) == 1;
      waddr  = ($urandom % 4 == 0) ? raddr0 : AW'($urandom % DEPTH);
      wdata  = rnd_c();
      #1;
      checks += 2;
      if (rdata0 !== ref_mem[raddr0]) begin
        failures++;
        $display("port 0 addr %0d mismatch", raddr0);
      end
      if (rdata1 !== ref_mem[raddr1]) begin
        failures++;
        $display("port 1 addr %0d mismatch", raddr1);
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
