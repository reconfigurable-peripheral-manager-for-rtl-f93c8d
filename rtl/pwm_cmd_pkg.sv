// pwm_cmd_pkg: layout of the 16-bit output register that commands a PWM
// (unidirectional or H-bridge), and the decoding shared by both blocks.
//
// The register carries a signed speed between -100 and 100 (percent), a
// 4-bit dead zone and an enable bit. Bits [15:13] are unused.
package pwm_cmd_pkg;
  typedef struct packed {
    logic [2:0] rsvd;      // [15:13]
    logic       enable;    // [12]
    logic [3:0] deadzone;  // [11:8]
    logic [7:0] value;     // [7:0], two's complement, -100..100
  } pwm_cmd_t;

  // Magnitude in percent after enable, clamping to 100 and the dead zone:
  // commands whose magnitude does not exceed the dead zone give 0.
  function automatic logic [6:0] pwm_percent(pwm_cmd_t c);
    logic [7:0] mag;
    mag = c.value[7] ? 8'(-c.value) : c.value;
    if (mag > 8'd100) mag = 8'd100;
    if (!c.enable || mag <= 8'(c.deadzone)) return '0;
    return mag[6:0];
  endfunction
endpackage
