// sort_pkg: constants shared by the CO2 sorting design.
//
// The sensor network has 40 end devices, so the memories hold 40 readings by
// default. The width of one reading, the clock frequency and the serial baud
// rate are this design's own choices: 16-bit readings (the sensor is read
// through an ADC of at most 16 bits), a 50 MHz board clock and 115200 baud.
package sort_pkg;

  // Number of sensor readings one sorting round holds (one per end device).
  parameter int unsigned N_SENSORS = 40;
  // Width of one reading; a multiple of 8 so it travels as whole bytes.
  parameter int unsigned DATA_W    = 16;
  // System clock and serial line rate.
  parameter int unsigned CLK_HZ    = 50_000_000;
  parameter int unsigned BAUD      = 115_200;

  // Width of a counter that must hold values 0 .. n inclusive.
  function automatic int unsigned cnt_width(input int unsigned n);
    return (n < 2) ? 1 : $clog2(n + 1);
  endfunction

  // Width of an address into a memory of n words.
  function automatic int unsigned addr_width(input int unsigned n);
    return (n < 2) ? 1 : $clog2(n);
  endfunction

endpackage
