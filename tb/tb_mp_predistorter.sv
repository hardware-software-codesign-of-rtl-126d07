// tb_mp_predistorter: self-checking test of the memory-polynomial predistorter.
//
// Runs the test sequence of mp_pd_run on two builds of the predistorter: the
// default two samples per clock and an eight-lane build (the widest the
// design is meant to scale to), in parallel, and reports the combined result.
module tb_mp_predistorter;
  logic fin2, fin8;
  int   c2, f2, c8, f8;

  mp_pd_run #(.LANES(2)) u_lanes2 (.finished(fin2), .checks(c2), .failures(f2));
  mp_pd_run #(.LANES(8)) u_lanes8 (.finished(fin8), .checks(c8), .failures(f8));

  initial begin
    #2000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8, f2 + f8 + 1);
    $finish;
  end

  initial begin
    wait (fin2 === 1'b1 && fin8 === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8, f2 + f8);
    $finish;
  end
endmodule
