// tb_geom_pkg: floating-point stereo geometry for the testbenches.
//
// Provides a fixed reference scene: camera A at the origin, camera B with
// rotation R (about 10 degrees yaw towards camera A, 3 degrees pitch, 2 degrees roll) and unit
// translation t, so that X_B = R X_A + t. It projects 3D points to normalized
// coordinates, forms the true essential matrix E = [t]x R, and converts
// between real numbers and the design's Q16.16 / Q2.30 fixed-point formats.
// Everything here is computed independently of the RTL.
package tb_geom_pkg;
  typedef real mat3 [3][3];
  typedef real vec3 [3];

  function automatic int q16(input real x); return int'(x * 65536.0); endfunction
  function automatic int q30(input real x); return int'(x * 1073741824.0); endfunction
  function automatic real f16(input int x); return real'(x) / 65536.0; endfunction
  function automatic real f30(input int x); return real'(x) / 1073741824.0; endfunction
  function automatic real fabs(input real x); return x < 0 ? -x : x; endfunction

  function automatic mat3 mmul(input mat3 a, input mat3 b);
    mat3 r;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        r[i][j] = 0;
        for (int k = 0; k < 3; k++) r[i][j] += a[i][k] * b[k][j];
      end
    return r;
  endfunction

  function automatic mat3 rot_xyz(input real ax, input real ay, input real az);
    mat3 rx, ry, rz;
    rx = '{'{1, 0, 0}, '{0, $cos(ax), -$sin(ax)}, '{0, $sin(ax), $cos(ax)}};
    ry = '{'{$cos(ay), 0, $sin(ay)}, '{0, 1, 0}, '{-$sin(ay), 0, $cos(ay)}};
    rz = '{'{$cos(az), -$sin(az), 0}, '{$sin(az), $cos(az), 0}, '{0, 0, 1}};
    return mmul(rz, mmul(ry, rx));
  endfunction

  // Reference relative pose of camera B.
  function automatic mat3 ref_r();
    return rot_xyz(0.0524, 0.1745, 0.0349);
  endfunction
  function automatic vec3 ref_t();
    vec3 t;
    real n;
    t = '{-1.0, 0.08, 0.15};
    n = $sqrt(t[0] * t[0] + t[1] * t[1] + t[2] * t[2]);
    for (int i = 0; i < 3; i++) t[i] /= n;
    return t;
  endfunction

  // E = [t]x R, scaled to unit Frobenius norm.
  function automatic mat3 ref_e();
    mat3 tx, e;
    vec3 t;
    real n;
    t = ref_t();
    tx = '{'{0, -t[2], t[1]}, '{t[2], 0, -t[0]}, '{-t[1], t[0], 0}};
    e = mmul(tx, ref_r());
    n = 0;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) n += e[i][j] * e[i][j];
    n = $sqrt(n);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) e[i][j] /= n;
    return e;
  endfunction

  // Point in camera-B coordinates.
  function automatic vec3 to_b(input vec3 x);
    mat3 r;
    vec3 t, y;
    r = ref_r();
    t = ref_t();
    for (int i = 0; i < 3; i++) y[i] = r[i][0] * x[0] + r[i][1] * x[1] + r[i][2] * x[2] + t[i];
    return y;
  endfunction

  // A pseudo-random point in front of both cameras (deterministic in k).
  function automatic vec3 scene_point(input int k);
    vec3 x;
    x[0] = -0.9 + 1.7 * ((k * 37 % 101) / 101.0);
    x[1] = -0.7 + 1.4 * ((k * 53 % 97) / 97.0);
    x[2] =  3.5 + 3.0 * ((k * 29 % 89) / 89.0);
    return x;
  endfunction
endpackage
