// Application-size testbench of adaptive_beamformer: the array sizes of
// the four phased-array applications the design is meant to scale to,
//   satellite TV (DVB-S)     256 antennas,  3 beams
//   radar                   4096 antennas, 20 beams
//   radio astronomy         8672 antennas, 24 beams
//   wireless base station     64 antennas, 32 beams
// each run by a wl_run instance for three snapshots with a steering update
// on the second one (update period 2 instead of 250, so that an update
// happens within a simulation of reasonable length). Every instance checks
// beam and matched-filter outputs bit for bit and the snapshot cycle
// counts (see wl_run); this module sums their results. A watchdog ends the
// run if an instance hangs.
module tb_array_sizes;
  logic fin [4];
  int   chk [4], fail [4];

  wl_run #(.N(256),  .B(3),  .UP(2), .SNAPS(3)) u_dvbs  (.finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  wl_run #(.N(4096), .B(20), .UP(2), .SNAPS(3)) u_radar (.finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  wl_run #(.N(8672), .B(24), .UP(2), .SNAPS(3)) u_astro (.finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  wl_run #(.N(64),   .B(32), .UP(2), .SNAPS(3)) u_wbs   (.finished(fin[3]), .checks(chk[3]), .failures(fail[3]));

  logic wclk = 0;
  always #5 wclk = ~wclk;

  function automatic void report(input int extra);
    int c, f;
    c = 0; f = extra;
    for (int i = 0; i < 4; i++) begin c += chk[i]; f += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin
    repeat (2_000_000) @(posedge wclk);
    $display("watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    @(posedge wclk);  // let every instance clear its `finished` flag first
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    report(0);
    $finish;
  end
endmodule
