// tb_fb_write_port: checks the shared frame-buffer write port.
// Random CPU stores, line-engine pixels and a random full flag; for every
// cycle the expected FIFO write, write data, CPU stall and line-engine
// ready are worked out from the rules: CPU first, everybody waits on a
// full buffer, off-screen pixels are consumed without a write.
module tb_fb_write_port;
  import mips150_io_pkg::*;

  logic      cpu_we, cpu_stall, le_valid, le_ready, fifo_we, fifo_full;
  fb_write_t cpu_wr, le_pix, fifo_wdata;

  fb_write_port dut (.*);

  int checks = 0, failures = 0;
  int n_cpu_prio = 0, n_stall = 0, n_clip = 0;

  function automatic fb_write_t rnd_px();
    fb_write_t p;
    p.x = ($urandom_range(9) == 0) ? 10'($urandom_range(1023, 800)) : 10'($urandom_range(799));
    p.y = ($urandom_range(9) == 0) ? 10'($urandom_range(1023, 600)) : 10'($urandom_range(599));
    p.color = 16'($urandom);
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      bit exp_we, exp_stall, exp_rdy, onscr;
      fb_write_t exp_d;
      cpu_we = $urandom_range(1); le_valid = $urandom_range(1);
      fifo_full = ($urandom_range(3) == 0);
      cpu_wr = rnd_px(); le_pix = rnd_px();
      #1;
      exp_d     = cpu_we ? cpu_wr : le_pix;
      onscr     = exp_d.x < 800 && exp_d.y < 600;
      exp_we    = (cpu_we || le_valid) && !fifo_full && onscr;
      exp_stall = cpu_we && fifo_full;
      exp_rdy   = !cpu_we && !fifo_full;
      if (cpu_we && le_valid && !fifo_full) n_cpu_prio++;
      if (exp_stall) n_stall++;
      if ((cpu_we || le_valid) && !fifo_full && !onscr) n_clip++;
      checks++;
      if (fifo_we != exp_we || cpu_stall != exp_stall || le_ready != exp_rdy ||
          (exp_we && fifo_wdata != exp_d)) begin
        failures++;
        if (failures < 10) $display("FAIL at %0d", i);
      end
    end
    checks++; if (n_cpu_prio == 0 || n_stall == 0 || n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
