// tb_wp_cache_sizes: the cache system at the other sizes it is meant to be
// evaluated at, all simulated side by side with the same kind of traffic.
//
// L2 configurations, all with 128-byte lines and 128-entry WP-TLBs:
// 512 KB 16-way (256 sets), 256 KB 8-way (256 sets) and 256 KB 16-way
// (128 sets). Way table sizes, with the 512 KB 8-way L2: 64, 256, 512 and
// 1024 entries (the way table has as many entries as the TLB). Each
// configuration runs in its own wp_sys_run harness, which checks data,
// latencies, way activation and the way table write rule (see there). For
// the 16-way L2 the read energy saving is estimated with 1.301 nJ per
// all-way and 0.113 nJ per single-way read; the 8-way runs use 0.711 and
// 0.126 nJ; no per-access energies are used for the 256 KB L2s, whose
// single-way share is reported instead.
// Ends with the summed TB_RESULT line; a watchdog stops it if any harness hangs.
module tb_wp_cache_sizes;
  localparam int NC = 7;
  logic [NC-1:0] done;
  int c [NC], f [NC];

  wp_sys_run #(.L2_WAYS(16), .L2_SETS(256), .E_SET(1.301), .E_WAY(0.113), .NAME("512KB 16-way"))
    r0 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  wp_sys_run #(.L2_WAYS(8), .L2_SETS(256), .NAME("256KB 8-way"))
    r1 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  wp_sys_run #(.L2_WAYS(16), .L2_SETS(128), .NAME("256KB 16-way"))
    r2 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  wp_sys_run #(.TLB_ENTRIES(64), .E_SET(0.711), .E_WAY(0.126), .NAME("64-entry way table"))
    r3 (.done(done[3]), .checks(c[3]), .failures(f[3]));
  wp_sys_run #(.TLB_ENTRIES(256), .E_SET(0.711), .E_WAY(0.126), .NAME("256-entry way table"))
    r4 (.done(done[4]), .checks(c[4]), .failures(f[4]));
  wp_sys_run #(.TLB_ENTRIES(512), .E_SET(0.711), .E_WAY(0.126), .NAME("512-entry way table"))
    r5 (.done(done[5]), .checks(c[5]), .failures(f[5]));
  wp_sys_run #(.TLB_ENTRIES(1024), .E_SET(0.711), .E_WAY(0.126), .NAME("1024-entry way table"))
    r6 (.done(done[6]), .checks(c[6]), .failures(f[6]));

  function automatic int total(input int a [NC]);
    int t = 0;
    foreach (a[i]) t += a[i];
    return t;
  endfunction

  initial begin
    #100000000;
    $display("watchdog: done %b", done);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    wait (&done);
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
