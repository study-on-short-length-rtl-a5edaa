// tb_fft64_channels: runs the 64-point processor in its 1- and 2-channel
// configurations (ticks every 20 and 10 cycles, i.e. 400 and 200 MHz for a
// 20 MHz sample rate) side by side, each through fft64_stream_check: four
// back-to-back random frames, every result against a floating-point DFT/64,
// index coverage and frame period. The default 4-channel configuration is
// covered by tb_fft64_cordic_da.
module tb_fft64_channels;
  logic done1, done2;
  int checks1, checks2, fail1, fail2, err1, err2;
  int checks, failures;

  fft64_stream_check #(.CHANNELS(1)) u_c1 (.done(done1), .checks(checks1), .failures(fail1), .maxerr(err1));
  fft64_stream_check #(.CHANNELS(2)) u_c2 (.done(done2), .checks(checks2), .failures(fail2), .maxerr(err2));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks2, fail1 + fail2 + 1);
    $finish;
  end

  initial begin
    wait (done1 && done2);
    checks   = checks1 + checks2;
    failures = fail1 + fail2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
